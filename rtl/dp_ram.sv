// dp_ram: vendor-neutral dual-port RAM used for the medium and large lists
// (arrays) of generated actors.
//
// Written in the plain style that FPGA and ASIC synthesizers infer as block
// RAM without a vendor template: one write port (we, waddr, wdata) and one
// read port (raddr, rdata) on a single clock. The read is synchronous:
// rdata shows the word at raddr one cycle after raddr is presented. A read and
// a write to the same address in one cycle return the old word (read-first).
// The contents are not reset, as in a real RAM block.
//
// A vendor-neutral RAM entity that is inferred rather than instantiated is
// what the design calls for; the widths, the single clock, the synchronous
// read and read-first behaviour are this design's choices.
module dp_ram #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[waddr] <= wdata;
    end
    rdata <= mem[raddr];
  end

endmodule
