// com_arbiter: point-to-point communication arbiter between a producing actor
// and one consuming actor.
//
// The producing actor keeps its output token in its own output register; this
// block never stores data. Its only state is one flip-flop that records "a
// token has been produced and not yet consumed". That bit is the state of a
// two-state FSM (EMPTY, FULL):
//   - send   : FULL, i.e. a token is waiting on the channel (to the consumer).
//   - pready : the actor scheduler may fire an action that writes the port.
//              It is high when the channel is EMPTY, or when the consumer
//              acknowledges the waiting token in this same cycle, so a new
//              token can follow every cycle.
//   - psend  : pulse from the actor, a token was written to its output
//              register this cycle. The producer must only pulse it while
//              pready is high (checked by an assertion).
//   - ack    : pulse from the consumer, the waiting token is consumed this
//              cycle. Only legal while send is high.
// Timing: a token produced in cycle t is offered (send high) from cycle t+1
// until the cycle of its ack. pready is combinational in ack.
//
// The one-bit state, the lock/unlock of the scheduler and the absence of a
// data store follow the described arbiter. The exact port list and letting
// pready depend on ack in the same cycle (for one token per cycle) are this
// design's choices.
module com_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic psend,
  output logic pready,
  output logic send,
  input  logic ack
);

  typedef enum logic {EMPTY = 1'b0, FULL = 1'b1} arb_state_t;

  arb_state_t state;

  assign send   = (state == FULL);
  assign pready = (state == EMPTY) || ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= EMPTY;
    end else if (psend) begin
      state <= FULL;
    end else if (ack) begin
      state <= EMPTY;
    end
  end

  // A token may only be produced when the scheduler was unlocked, and only a
  // token that is on the channel may be acknowledged.
  a_no_overwrite : assert property (@(posedge clk) psend |-> pready);
  a_ack_valid    : assert property (@(posedge clk) ack |-> send);

endmodule
