// tb_clip_actor: self-checking test of the Clip actor and its one-action-per-
// cycle scheduler.
// Two random producers offer SIGNED flags and 10-bit samples (holding each
// token until it is acknowledged) and the output room O_rdy toggles at random.
// A reference model of count and sflag predicts, every cycle, which action
// fires (SIGNED_ack, I_ack, O_psend) and, after a limit action, the clipped
// output value. A second phase offers every token at once with the output
// always free and checks the rate: one SIGNED token plus BLOCK samples take
// exactly BLOCK+1 cycles per block.
module tb_clip_actor;

  localparam int BLOCK = 64;

  logic              clk = 1'b0;
  logic              rst_n;
  logic signed [9:0] I_data;
  logic              I_send, I_ack;
  logic              SIGNED_data, SIGNED_send, SIGNED_ack;
  logic signed [8:0] O_data;
  logic              O_rdy, O_psend;

  int checks = 0;
  int failures = 0;
  int n_hi = 0, n_lo_s = 0, n_lo_u = 0, n_pass = 0, n_stall = 0;

  int m_count;
  bit m_sflag;

  always #5 clk = ~clk;

  clip_actor dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int ref_clip(input int x, input bit s);
    int lo;
    lo = s ? -255 : 0;
    if (x > 255) return 255;
    if (x < lo) return lo;
    return x;
  endfunction

  function automatic logic signed [9:0] rand_sample();
    case ($urandom_range(0, 4))
      0:       return 10'($urandom_range(256, 511));          // above 255
      1:       return 10'(-int'($urandom_range(256, 512)));   // below -255
      2:       return 10'(-int'($urandom_range(1, 255)));     // negative, in signed range
      default: return 10'($urandom_range(0, 255));
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle of the reference model; returns 1 if limit fired
  task automatic step(input bit random_phase, output bit limit_fired, output int exp_out);
    bit exp_rs, exp_lim;
    #1;
    exp_rs  = (m_count < 0) && SIGNED_send;
    exp_lim = !exp_rs && (m_count >= 0) && I_send && O_rdy;
    check(SIGNED_ack == exp_rs, "SIGNED_ack");
    check(I_ack == exp_lim, "I_ack");
    check(O_psend == exp_lim, "O_psend");
    if ((m_count >= 0) && I_send && !O_rdy) n_stall++;
    exp_out = ref_clip(int'(I_data), m_sflag);
    limit_fired = exp_lim;
    @(posedge clk);
    if (exp_rs) begin
      m_sflag = SIGNED_data;
      m_count = BLOCK - 1;
    end else if (exp_lim) begin
      m_count--;
      if (exp_out == 255 && I_data != 255) n_hi++;
      else if (exp_out == -255 && I_data != -255) n_lo_s++;
      else if (exp_out == 0 && I_data < 0) n_lo_u++;
      else n_pass++;
    end
    #1;
    if (exp_rs) SIGNED_send = 1'b0;
    if (exp_lim) begin
      I_send = 1'b0;
      check(O_data == 9'(exp_out), $sformatf("O_data %0d expected %0d", O_data, exp_out));
    end
  endtask

  initial begin
    bit fired;
    int eo;
    int t0, n_blocks;
    rst_n = 1'b0; I_send = 1'b0; SIGNED_send = 1'b0; O_rdy = 1'b0;
    I_data = '0; SIGNED_data = 1'b0;
    m_count = -1; m_sflag = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // random phase
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (!SIGNED_send && $urandom_range(0, 3) == 0) begin
        SIGNED_send = 1'b1; SIGNED_data = 1'($urandom);
      end
      if (!I_send && $urandom_range(0, 3) != 0) begin
        I_send = 1'b1; I_data = rand_sample();
      end
      O_rdy = ($urandom_range(0, 3) != 0);
      step(1'b1, fired, eo);
    end
    // drain to a block boundary: finish the current block at full rate
    while (m_count >= 0) begin
      @(negedge clk);
      if (!I_send) begin I_send = 1'b1; I_data = rand_sample(); end
      O_rdy = 1'b1;
      step(1'b0, fired, eo);
    end
    // rate phase: all tokens always present, output always free
    n_blocks = 3;
    t0 = 0;
    for (int c = 0; c < n_blocks * (BLOCK + 1); c++) begin
      @(negedge clk);
      if (!SIGNED_send) begin SIGNED_send = 1'b1; SIGNED_data = 1'(c / (BLOCK + 1)); end
      if (!I_send) begin I_send = 1'b1; I_data = rand_sample(); end
      O_rdy = 1'b1;
      step(1'b0, fired, eo);
      if (fired) t0++;
    end
    check(t0 == n_blocks * BLOCK, $sformatf("rate: %0d samples in %0d cycles", t0, n_blocks * (BLOCK + 1)));
    check(m_count < 0, "rate: block boundary reached");
    check(n_hi > 20 && n_lo_s > 20 && n_lo_u > 20 && n_pass > 20 && n_stall > 20,
          $sformatf("coverage hi=%0d lo_s=%0d lo_u=%0d pass=%0d stall=%0d",
                    n_hi, n_lo_s, n_lo_u, n_pass, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
