// tb_rate_mismatch: two actors with different firing patterns joined by a
// com_arbiter, as between the ShuffleFly and Shuffle actors of a 1-D IDCT:
// the producer can produce only on every second cycle (pattern 0,1) and the
// consumer can consume only on two cycles out of three (pattern 1,1,0).
// Without transmission control the consumer would read a token twice or miss
// one. The producer here writes a numbered token into its own output
// register when its pattern allows and the arbiter's pready is high; the
// consumer takes the offered token when its pattern allows. The test checks
// that the consumer sees every number exactly once and in order, that it met
// both an empty channel (no re-read) and a waiting token (no loss), and that
// the long-run rate equals the slower side (one token per two cycles).
module tb_rate_mismatch;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       psend, pready, send, ack;
  logic [7:0] data_reg;
  int         checks = 0;
  int         failures = 0;
  int         next_tx = 0;
  int         next_rx = 0;
  int         n_empty = 0;
  int         n_wait = 0;
  int         cyc = 0;

  always #5 clk = ~clk;

  com_arbiter dut (.clk(clk), .rst_n(rst_n), .psend(psend), .pready(pready), .send(send), .ack(ack));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; psend = 1'b0; ack = 1'b0; data_reg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (cyc = 0; cyc < 1200; cyc++) begin
      @(negedge clk);
      ack = send && (cyc % 3 != 2);          // consumer pattern 1,1,0
      #1;
      psend = pready && (cyc % 2 == 1);      // producer pattern 0,1
      if (!send && (cyc % 3 != 2)) n_empty++;
      if (send && (cyc % 3 == 2)) n_wait++;
      if (ack) begin
        check(data_reg == 8'(next_rx), $sformatf("token %0d read as %0d", next_rx, data_reg));
        next_rx++;
      end
      @(posedge clk);
      if (psend) begin
        data_reg <= 8'(next_tx);
        next_tx++;
      end
    end
    check(n_empty > 0, "consumer found no new token and did not read the old one again");
    check(n_wait > 0, "a token waited on the channel for the consumer");
    check(next_tx - next_rx <= 1, "no token lost in flight");
    check(next_rx >= 590 && next_rx <= 600, $sformatf("rate: %0d tokens in 1200 cycles", next_rx));
    $display("tokens=%0d empty=%0d wait=%0d", next_rx, n_empty, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
