// tb_broadcast: self-checking test of the broadcast manager with three
// targets (and a second instance at the default size two). A source offers
// tokens and holds send until it is acknowledged; each target acknowledges an
// offered token at random. A reference model of the per-target consumption
// flags predicts every out_send and in_ack. The test also counts tokens that
// reached the targets in different cycles and tokens taken by all targets in
// one cycle.
module tb_broadcast;

  localparam int N = 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_send, in_ack;
  logic [N-1:0] out_send, out_ack;
  logic         in_send2, in_ack2;
  logic [1:0]   out_send2, out_ack2;
  int           checks = 0;
  int           failures = 0;
  int           n_split = 0;
  int           n_together = 0;
  int           n_tokens = 0;
  bit [N-1:0]   m_cons;
  bit [1:0]     m_cons2;

  always #5 clk = ~clk;

  broadcast #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_send(in_send), .in_ack(in_ack),
                          .out_send(out_send), .out_ack(out_ack));
  broadcast dut2 (.clk(clk), .rst_n(rst_n), .in_send(in_send2), .in_ack(in_ack2),
                  .out_send(out_send2), .out_ack(out_ack2));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [N-1:0] exp_send;
    bit         exp_ack;
    bit [1:0]   exp_send2;
    bit         exp_ack2;
    rst_n = 1'b0; in_send = 1'b0; out_ack = '0; in_send2 = 1'b0; out_ack2 = '0;
    m_cons = '0; m_cons2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // source: keep an offered token until acknowledged
      if (!in_send)  in_send  = ($urandom_range(0, 3) != 0);
      if (!in_send2) in_send2 = ($urandom_range(0, 3) != 0);
      exp_send  = {N{in_send}} & ~m_cons;
      exp_send2 = {2{in_send2}} & ~m_cons2;
      #1;
      check(out_send == exp_send, "out_send (N=3)");
      check(out_send2 == exp_send2, "out_send (N=2)");
      // targets only acknowledge what the block actually offers them
      for (int k = 0; k < N; k++)
        out_ack[k] = out_send[k] && (cyc < 200 || $urandom_range(0, 2) == 0);
      for (int k = 0; k < 2; k++)
        out_ack2[k] = out_send2[k] && ($urandom_range(0, 1) == 0);
      exp_ack  = in_send  && ((m_cons  | out_ack)  == '1);
      exp_ack2 = in_send2 && ((m_cons2 | out_ack2) == '1);
      #1;
      check(in_ack == exp_ack, "in_ack (N=3)");
      check(in_ack2 == exp_ack2, "in_ack (N=2)");
      if (in_send && out_ack != '0 && !exp_ack) n_split++;
      if (exp_ack && m_cons == '0) n_together++;
      if (exp_ack) n_tokens++;
      @(posedge clk);
      m_cons  = exp_ack  ? '0 : (m_cons  | out_ack);
      m_cons2 = exp_ack2 ? '0 : (m_cons2 | out_ack2);
      #1;
      if (exp_ack)  in_send  = 1'b0;
      if (exp_ack2) in_send2 = 1'b0;
    end
    check(n_split > 50, "partial consumption happened");
    check(n_together > 50, "all targets in one cycle happened");
    check(n_tokens > 300, "enough tokens broadcast");
    $display("tokens=%0d split=%0d together=%0d", n_tokens, n_split, n_together);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
