// tb_clip_network: end-to-end test of the Clip network with every parameter
// at its default (two broadcast targets).
// Producers: a SIGNED flag stream (one flag per 64-sample block) and a sample
// stream, each offering a token and holding it until acknowledged, with random
// gaps. Consumers: two targets that acknowledge offered tokens at random and
// independently. The expected output stream is computed from the input
// streams by a reference clip model; each target must receive every token,
// in order, exactly once. A final phase runs at full rate and checks the
// throughput of one token per cycle through actor, arbiter and broadcast.
// Mechanisms counted (each must happen): actor locked by a busy channel,
// producer starved, token taken by the two targets in different cycles and
// in the same cycle, back-to-back tokens, clipping high / low signed / low
// unsigned / pass-through, both SIGNED modes. The RAM entity beside the
// network is written and read back.
module tb_clip_network;

  localparam int BLOCK   = 64;
  localparam int NBLOCKS = 40;
  localparam int NT      = 2;

  logic              clk = 1'b0;
  logic              rst_n;
  logic signed [9:0] I_data;
  logic              I_send, I_ack;
  logic              SIGNED_data, SIGNED_send, SIGNED_ack;
  logic signed [8:0] O_data;
  logic [NT-1:0]     O_send, O_ack;
  logic              ram_we;
  logic [5:0]        ram_waddr, ram_raddr;
  logic [15:0]       ram_wdata, ram_rdata;

  int checks = 0;
  int failures = 0;

  // stimulus and expected streams
  int  samples [NBLOCKS * BLOCK];
  bit  flags   [NBLOCKS];
  int  expected[NBLOCKS * BLOCK];
  int  i_idx = 0, s_idx = 0;
  int  rx_idx [NT];
  bit  full_rate = 1'b0;
  int  rx_last_cycle = 0;

  // mechanism counters
  int n_lock = 0, n_starve = 0, n_split = 0, n_joint = 0, n_b2b = 0;
  int n_hi = 0, n_lo_s = 0, n_lo_u = 0, n_pass = 0, n_sig0 = 0, n_sig1 = 0;

  always #5 clk = ~clk;

  clip_network dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build the streams and the reference output
  initial begin
    for (int b = 0; b < NBLOCKS; b++) begin
      flags[b] = (b % 3 != 0);
      for (int j = 0; j < BLOCK; j++) begin
        int x, lo;
        case ($urandom_range(0, 4))
          0:       x = $urandom_range(256, 511);
          1:       x = -int'($urandom_range(256, 512));
          2:       x = -int'($urandom_range(1, 255));
          default: x = $urandom_range(0, 255);
        endcase
        samples[b * BLOCK + j] = x;
        lo = flags[b] ? -255 : 0;
        expected[b * BLOCK + j] = (x > 255) ? 255 : (x < lo) ? lo : x;
      end
    end
  end

  // producers and consumers, driven after each falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (!SIGNED_send && s_idx < (full_rate ? NBLOCKS : NBLOCKS - 4) && (full_rate || $urandom_range(0, 1) == 0)) begin
        SIGNED_send <= 1'b1; SIGNED_data <= flags[s_idx];
      end
      if (!I_send && i_idx < (full_rate ? NBLOCKS : NBLOCKS - 4) * BLOCK && (full_rate || $urandom_range(0, 4) != 0)) begin
        I_send <= 1'b1; I_data <= 10'(samples[i_idx]);
      end
    end
  end

  always @(negedge clk) begin
    #1;
    for (int k = 0; k < NT; k++)
      O_ack[k] = O_send[k] && (full_rate || $urandom_range(0, 2) != 0);
  end

  // bookkeeping at each rising edge
  logic prev_iack = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_clip.count >= 0 && I_send && !dut.o_rdy) n_lock++;
      if (dut.u_clip.count >= 0 && !I_send && dut.o_rdy) n_starve++;
      if (O_send != '0 && O_ack != '0 && O_send != O_ack) n_split++;
      if (O_send == '1 && O_ack == '1) n_joint++;
      if (I_ack && prev_iack) n_b2b++;
      prev_iack <= I_ack;
      for (int k = 0; k < NT; k++) begin
        if (O_ack[k]) begin
          check(!$isunknown(O_data), "O_data known");
          if (rx_idx[k] < NBLOCKS * BLOCK)
            check(int'(O_data) == expected[rx_idx[k]],
                  $sformatf("target %0d token %0d: got %0d expected %0d",
                            k, rx_idx[k], O_data, expected[rx_idx[k]]));
          else
            check(1'b0, "extra token");
          rx_idx[k]++;
          rx_last_cycle = cyc;
        end
      end
      if (I_ack) begin
        int x, e;
        x = samples[i_idx];
        e = expected[i_idx];
        if (e == 255 && x != 255) n_hi++;
        else if (e == -255 && x != -255) n_lo_s++;
        else if (e == 0 && x < 0) n_lo_u++;
        else n_pass++;
        I_send <= 1'b0;
        i_idx <= i_idx + 1;
      end
      if (SIGNED_ack) begin
        if (SIGNED_data) n_sig1++; else n_sig0++;
        SIGNED_send <= 1'b0;
        s_idx <= s_idx + 1;
      end
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t_start, rate_tokens, rate_cycles;
    rst_n = 1'b0; I_send = 1'b0; SIGNED_send = 1'b0; I_data = '0; SIGNED_data = 1'b0;
    O_ack = '0; ram_we = 1'b0; ram_waddr = '0; ram_raddr = '0; ram_wdata = '0;
    rx_idx[0] = 0; rx_idx[1] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // random-rate part: first NBLOCKS-4 blocks
    wait (s_idx == NBLOCKS - 4 && i_idx == (NBLOCKS - 4) * BLOCK &&
          rx_idx[0] == i_idx && rx_idx[1] == i_idx);
    // full-rate part: last 4 blocks
    @(negedge clk);
    full_rate = 1'b1;
    t_start = cyc;
    wait (rx_idx[0] == NBLOCKS * BLOCK && rx_idx[1] == NBLOCKS * BLOCK);
    rate_cycles = rx_last_cycle - t_start + 1;
    rate_tokens = 4 * BLOCK;
    // 4 SIGNED cycles + 256 samples + 1 cycle latency from fire to offer
    check(rate_cycles == rate_tokens + 4 + 1,
          $sformatf("full rate: %0d tokens in %0d cycles", rate_tokens, rate_cycles));
    repeat (5) @(posedge clk);
    check(O_send == '0, "no token left on the channel");

    // RAM entity: write a few words, read them back
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      ram_we = 1'b1; ram_waddr = 6'(a * 5); ram_wdata = 16'(a * 1234 + 7);
    end
    @(negedge clk) ram_we = 1'b0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk) ram_raddr = 6'(a * 5);
      @(posedge clk) #1;
      check(ram_rdata == 16'(a * 1234 + 7), "ram read back");
    end

    $display("lock=%0d starve=%0d split=%0d joint=%0d b2b=%0d hi=%0d lo_s=%0d lo_u=%0d pass=%0d sig0=%0d sig1=%0d",
             n_lock, n_starve, n_split, n_joint, n_b2b, n_hi, n_lo_s, n_lo_u, n_pass, n_sig0, n_sig1);
    check(n_lock > 0,   "actor locked by busy channel");
    check(n_starve > 0, "actor starved of input");
    check(n_split > 0,  "broadcast targets consumed in different cycles");
    check(n_joint > 0,  "broadcast targets consumed together");
    check(n_b2b > 0,    "back-to-back tokens");
    check(n_hi > 0 && n_lo_s > 0 && n_lo_u > 0 && n_pass > 0, "all clip cases");
    check(n_sig0 > 0 && n_sig1 > 0, "both SIGNED modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
