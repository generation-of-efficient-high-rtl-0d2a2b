// clip_actor: the Clip actor of an IDCT back end, written the way a dataflow
// actor is turned into hardware here: a clocked execute process that holds
// the actor's state variables and runs the fired action, and a separate
// combinational scheduler.
//
// Actor: input ports I (signed IN_W bits) and SIGNED (bool), output port O
// (signed OUT_W bits). State: count (signed COUNT_W bits, reset to -1) and
// sflag. Two actions, at most one fired per cycle:
//   read_signed  guard count < 0 and a SIGNED token:
//                sflag := SIGNED; count := BLOCK_TOKENS-1
//   limit        guard count >= 0, an I token and room on O:
//                min := sflag ? -255 : 0;
//                O := (i > 255) ? 255 : (i < min) ? min : i;
//                count := count - 1
// So each SIGNED token selects signed or unsigned clipping for the next
// BLOCK_TOKENS samples (one 8x8 block by default).
//
// Scheduler (combinational, one action per cycle): an if/elsif chain over the
// actions tests the guard, the token presence on the input port (*_send) and,
// for limit, the room on the output (O_rdy, from the com_arbiter). It raises
// the action's go signal and the input port's ack in the same cycle, so
// back-to-back tokens are consumed every cycle.
// Timing: an action fired in cycle t updates count/sflag/O_data at the clock
// edge ending t; O_psend is high during t, so the com_arbiter offers the new
// O_data from cycle t+1.
//
// The widths, the reset value of count, the limit action, the guard
// count >= 0 and the scheduler structure follow the described Clip actor.
// The read_signed action (its guard and count reload value BLOCK_TOKENS-1) is
// this design's reconstruction of the other action that sets min's flag.
module clip_actor #(
  parameter int unsigned IN_W         = 10,
  parameter int unsigned OUT_W        = 9,
  parameter int unsigned COUNT_W      = 7,
  parameter int unsigned BLOCK_TOKENS = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input port I
  input  logic signed [IN_W-1:0]  I_data,
  input  logic                    I_send,
  output logic                    I_ack,
  // input port SIGNED
  input  logic                    SIGNED_data,
  input  logic                    SIGNED_send,
  output logic                    SIGNED_ack,
  // output port O (data register, towards com_arbiter)
  output logic signed [OUT_W-1:0] O_data,
  input  logic                    O_rdy,
  output logic                    O_psend
);

  localparam logic signed [OUT_W-1:0] MAX_VAL    = OUT_W'(255);
  localparam logic signed [OUT_W-1:0] SIGNED_MIN = -OUT_W'(255);

  // Action selected by the scheduler in this cycle.
  typedef enum logic [1:0] {ACT_NONE, ACT_READ_SIGNED, ACT_LIMIT} action_t;

  logic signed [COUNT_W-1:0] count;
  logic                      sflag;
  action_t                   fire;

  // ---------------------------------------------------------------- scheduler
  always_comb begin
    logic sched_read_signed;
    logic sched_limit;
    sched_read_signed = (count < 0);
    sched_limit       = (count >= 0);

    fire       = ACT_NONE;
    I_ack      = 1'b0;
    SIGNED_ack = 1'b0;
    if (sched_read_signed && SIGNED_send) begin
      fire       = ACT_READ_SIGNED;
      SIGNED_ack = 1'b1;
    end else if (sched_limit && I_send) begin
      if (O_rdy) begin
        fire  = ACT_LIMIT;
        I_ack = 1'b1;
      end
    end
  end

  assign O_psend = (fire == ACT_LIMIT);

  // ------------------------------------------------- body of action "limit"
  // Temporary values of the action (min, the clipped token), computed from
  // the input token and the state; only the result is stored.
  logic signed [OUT_W-1:0] limit_min;
  logic signed [OUT_W-1:0] limit_out;

  always_comb begin
    limit_min = sflag ? SIGNED_MIN : '0;
    if (I_data > IN_W'(255)) begin
      limit_out = MAX_VAL;
    end else if (I_data < IN_W'(limit_min)) begin
      limit_out = limit_min;
    end else begin
      limit_out = OUT_W'(I_data);
    end
  end

  // ----------------------------------------------------------- execute process
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '1;            // -1: first wait for a SIGNED token
      sflag  <= 1'b0;
      O_data <= '0;
    end else begin
      unique case (fire)
        ACT_READ_SIGNED: begin
          sflag <= SIGNED_data;
          count <= COUNT_W'(BLOCK_TOKENS - 1);
        end
        ACT_LIMIT: begin
          O_data <= limit_out;
          count  <= count - 1'b1;
        end
        default: ;
      endcase
    end
  end

  // BLOCK_TOKENS-1 must be representable in the signed count variable.
  initial begin
    assert (BLOCK_TOKENS >= 1 && BLOCK_TOKENS <= 2**(COUNT_W-1))
      else $error("BLOCK_TOKENS does not fit in count");
  end

endmodule
