// clip_network: a small generated dataflow network built from the pieces of
// this library, end to end.
//
// The Clip actor reads a sample stream I and a SIGNED flag stream from two
// external producers. Its output port O is fanned out to two external
// consumers: the actor's PSend/PReady pair goes to a com_arbiter, whose
// channel Send/ack pair goes into a broadcast of size NUM_TARGETS, whose
// per-target send/ack pairs are the top's O_send/O_ack ports. All targets read
// the same O_data register of the actor; no FIFO sits anywhere in the
// network. Every channel uses the same protocol: the producer side raises
// *_send while a token is offered, the consumer raises *_ack for one cycle in
// the cycle it takes the token. With every consumer accepting, the network
// moves one token per cycle.
//
// Next to the network, the vendor-neutral dual-port RAM entity used for actor
// lists is instantiated with its ports brought out (ram_*), so that it is
// built and checked with the rest of the library; the Clip actor itself has
// no list that would need it.
//
// How the blocks are chained (actor -> com_arbiter -> broadcast) follows the
// described communication scheme; the external port names and putting the
// RAM beside the network are this design's choices.
module clip_network #(
  parameter int unsigned IN_W        = 10,
  parameter int unsigned OUT_W       = 9,
  parameter int unsigned NUM_TARGETS = 2,
  parameter int unsigned RAM_DATA_W  = 16,
  parameter int unsigned RAM_ADDR_W  = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // producer of I
  input  logic signed [IN_W-1:0]  I_data,
  input  logic                    I_send,
  output logic                    I_ack,
  // producer of SIGNED
  input  logic                    SIGNED_data,
  input  logic                    SIGNED_send,
  output logic                    SIGNED_ack,
  // consumers of O
  output logic signed [OUT_W-1:0] O_data,
  output logic [NUM_TARGETS-1:0]  O_send,
  input  logic [NUM_TARGETS-1:0]  O_ack,
  // dual-port RAM entity
  input  logic                    ram_we,
  input  logic [RAM_ADDR_W-1:0]   ram_waddr,
  input  logic [RAM_DATA_W-1:0]   ram_wdata,
  input  logic [RAM_ADDR_W-1:0]   ram_raddr,
  output logic [RAM_DATA_W-1:0]   ram_rdata
);

  logic o_psend;   // actor -> arbiter: token produced
  logic o_rdy;     // arbiter -> actor scheduler: port free
  logic ch_send;   // arbiter -> broadcast: token on the channel
  logic ch_ack;    // broadcast -> arbiter: all targets consumed

  clip_actor #(
    .IN_W  (IN_W),
    .OUT_W (OUT_W)
  ) u_clip (
    .clk         (clk),
    .rst_n       (rst_n),
    .I_data      (I_data),
    .I_send      (I_send),
    .I_ack       (I_ack),
    .SIGNED_data (SIGNED_data),
    .SIGNED_send (SIGNED_send),
    .SIGNED_ack  (SIGNED_ack),
    .O_data      (O_data),
    .O_rdy       (o_rdy),
    .O_psend     (o_psend)
  );

  com_arbiter u_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .psend  (o_psend),
    .pready (o_rdy),
    .send   (ch_send),
    .ack    (ch_ack)
  );

  broadcast #(
    .N (NUM_TARGETS)
  ) u_bcast (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_send  (ch_send),
    .in_ack   (ch_ack),
    .out_send (O_send),
    .out_ack  (O_ack)
  );

  dp_ram #(
    .DATA_W (RAM_DATA_W),
    .ADDR_W (RAM_ADDR_W)
  ) u_ram (
    .clk   (clk),
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (ram_wdata),
    .raddr (ram_raddr),
    .rdata (ram_rdata)
  );

endmodule
