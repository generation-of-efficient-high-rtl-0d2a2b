// tb_com_arbiter: self-checking test of the point-to-point communication
// arbiter. A random producer fires only when pready allows it and a random
// consumer acknowledges only an offered token. A one-bit reference model
// predicts send and pready every cycle. It also checks that a token can be
// produced in the same cycle as the previous one is consumed (one token per
// cycle) and that a full channel with no ack locks the producer.
module tb_com_arbiter;

  logic clk = 1'b0;
  logic rst_n;
  logic psend, pready, send, ack;
  int   checks = 0;
  int   failures = 0;
  int   n_same_cycle = 0;
  int   n_locked = 0;
  bit   model_full;

  always #5 clk = ~clk;

  com_arbiter dut (.clk(clk), .rst_n(rst_n), .psend(psend), .pready(pready), .send(send), .ack(ack));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; psend = 1'b0; ack = 1'b0; model_full = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // phase 0..999: random; 1000..1099: consumer always ready; 1100..1199: consumer stalled
      if (cyc >= 1000 && cyc < 1100)      ack = model_full;
      else if (cyc >= 1100 && cyc < 1200) ack = 1'b0;
      else                                ack = model_full && ($urandom_range(0, 2) != 0);
      #1;
      check(send == model_full, "send");
      check(pready == (!model_full || ack), "pready");
      psend = pready && ((cyc >= 1000 && cyc < 1200) || $urandom_range(0, 3) != 0);
      if (psend && ack) n_same_cycle++;
      if (model_full && !ack) n_locked++;
      @(posedge clk);
      model_full = psend ? 1'b1 : (ack ? 1'b0 : model_full);
    end
    @(negedge clk);
    ack = 1'b0; psend = 1'b0;
    // reset while full empties the channel
    rst_n = 1'b0;
    #1 check(send == 1'b0 && pready == 1'b1, "reset clears the channel");
    check(n_same_cycle > 50, "back-to-back tokens happened");
    check(n_locked > 50, "producer lock happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
