// tb_dp_ram: self-checking test of the dual-port RAM. It writes random words
// to random addresses while reading random addresses on the other port, and
// compares each read word, one cycle after its address, with a reference
// array, including reads of the address being written in the same cycle
// (the old word is expected).
module tb_dp_ram;

  localparam int DW = 16;
  localparam int AW = 6;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [2**AW];
  bit            valid [2**AW];
  int            checks = 0;
  int            failures = 0;
  int            n_collide = 0;

  always #5 clk = ~clk;

  dp_ram #(.DATA_W(DW), .ADDR_W(AW)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                          .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp;
    bit            exp_valid;
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    foreach (valid[i]) valid[i] = 1'b0;
    // fill every word once
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = DW'($urandom);
      @(posedge clk);
      model[a] = wdata; valid[a] = 1'b1;
    end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom);
      wdata = DW'($urandom);
      raddr = ($urandom_range(0, 7) == 0) ? waddr : AW'($urandom);
      if (we && raddr == waddr) n_collide++;
      exp = model[raddr];
      exp_valid = valid[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      if (exp_valid) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL @%0t: rdata %h expected %h", $time, rdata, exp);
        end
      end
    end
    checks++;
    if (n_collide < 10) begin
      failures++;
      $display("FAIL: too few same-address read/write cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
