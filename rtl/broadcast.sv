// broadcast: one-to-many broadcast manager for an output port that feeds N
// consuming actors.
//
// One flip-flop per target remembers that this target has already consumed
// the current token. The token is offered to target k (out_send[k]) as long
// as the input token is present and target k has not consumed it: the
// logical AND of the input send with the negated consumption bit. The source
// is acknowledged (in_ack) in the cycle where every target has consumed the
// token, either earlier (flip-flop set) or in this cycle (out_ack[k]): the
// comparison of those N bits with all ones. The flip-flops are then cleared
// for the next token. The data itself is not stored here; all targets read
// the source's output register.
// Interface: in_send/in_ack towards the source (or its com_arbiter), and
// out_send[k]/out_ack[k] per target. in_ack is combinational in out_ack, so
// when all targets accept at once the source can produce every cycle.
//
// The flip-flop per target, the AND gating and the all-ones compare follow
// the described broadcast; N is generic with the size-two example as default.
// Clearing the flags with in_ack and the port names are this design's choices.
module broadcast #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_send,
  output logic         in_ack,
  output logic [N-1:0] out_send,
  input  logic [N-1:0] out_ack
);

  logic [N-1:0] consumed;
  logic [N-1:0] done;

  always_comb begin
    out_send = {N{in_send}} & ~consumed;
    done     = consumed | (out_ack & out_send);
    in_ack   = in_send && (done == {N{1'b1}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      consumed <= '0;
    end else if (in_ack) begin
      consumed <= '0;
    end else begin
      consumed <= done;
    end
  end

  // A target may only acknowledge a token that is offered to it.
  a_ack_offered : assert property (@(posedge clk) (out_ack & ~out_send) == '0);

endmodule
