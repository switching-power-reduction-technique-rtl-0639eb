// tb_turbo_decoder: self-checking testbench of the turbo decoder.
//
// Random information bits are encoded with the reference LTE encoder
// (two RSC encoders and the QPP interleaver), sent through an AWGN channel
// and quantised to 6-bit LLRs. The testbench plays the power manager: it
// stops when a half-iteration changes no hard decision or after 16
// half-iterations. It checks
//  - the decoded bits against the transmitted ones (K = 40, with a partial
//    last window, and K = 1280 at 2 dB, both rate 1/3);
//  - the convergence metric of half-iteration h against the hard decisions
//    read out after decoding runs stopped at h-1 and h half-iterations;
//  - that 16 half-iterations of a K = 6144 block end within 17290 cycles
//    (65 us at 266 MHz);
//  - the half-iteration period with six SISO units in parallel: one cycle
//    per step of the ceil(ceil(K/32)/6) windows of a sub-block, plus the
//    last window's backward pass, plus 6.
module tb_turbo_decoder;
  import turbo_pkg::*;
  import tb_turbo_pkg::*;

  localparam int K_MAX  = 6144;
  localparam int N_SISO = 6;
  localparam int AW    = $clog2(K_MAX + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [AW-1:0] k_len, f1, f2;
  logic          ld_valid;
  logic [AW-1:0] ld_addr;
  llr_t          ld_sys, ld_p1, ld_p2;
  logic          start, busy, done, half_done, pm_valid, pm_stop;
  logic [AW-1:0] metric, rd_addr;
  logic          rd_bit;

  int checks = 0, failures = 0;

  turbo_decoder #(.K_MAX(K_MAX), .N_SISO(N_SISO)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit u [];
  int sys_q [], p1_q [], p2_q [];
  bit hd_prev [], hd_now [];
  int metrics [$];
  int half_periods [$];

  task automatic make_block(int k, int kf1, int kf2, real ebn0);
    bit [2:0] r1, r2;
    real s2;
    s2 = sigma2_of(ebn0, 1.0 / 3.0);
    u = new[k]; sys_q = new[k]; p1_q = new[k]; p2_q = new[k];
    r1 = '0; r2 = '0;
    for (int i = 0; i < k; i++) u[i] = bit'($urandom & 1);
    for (int i = 0; i < k; i++) begin
      sys_q[i] = channel_llr(u[i], s2);
      p1_q[i]  = channel_llr(rsc_step(r1, u[i]), s2);
      p2_q[i]  = channel_llr(rsc_step(r2, u[qpp(i, k, kf1, kf2)]), s2);
    end
  endtask

  task automatic load_block(int k, int kf1, int kf2);
    k_len = AW'(k); f1 = AW'(kf1); f2 = AW'(kf2);
    for (int i = 0; i < k; i++) begin
      @(negedge clk);
      ld_valid = 1'b1; ld_addr = AW'(i);
      ld_sys = llr_t'(sys_q[i]); ld_p1 = llr_t'(p1_q[i]); ld_p2 = llr_t'(p2_q[i]);
    end
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  // Run the decoder; stop after max_half half-iterations or at metric 0.
  task automatic run(int max_half, output int n_half);
    int t_last;
    n_half = 0;
    metrics.delete(); half_periods.delete();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    t_last = -1;
    forever begin
      @(posedge clk);
      #1;
      if (half_done) begin
        n_half++;
        metrics.push_back(int'(metric));
        if (t_last >= 0) half_periods.push_back(int'($time / 10) - t_last);
        t_last = int'($time / 10);
        pm_stop  = (metric == 0) || (n_half >= max_half);
        pm_valid = 1'b1;
        @(posedge clk); #1;
        pm_valid = 1'b0;
        if (pm_stop) break;
      end
    end
    wait (done);
  endtask

  task automatic read_bits(int k, ref bit dst []);
    dst = new[k];
    for (int i = 0; i < k; i++) begin
      @(negedge clk); rd_addr = AW'(i);
      @(posedge clk); #1;
      dst[i] = rd_bit;
    end
  endtask

  function automatic int count_errors(int k, bit a [], bit b []);
    int e = 0;
    for (int i = 0; i < k; i++) if (a[i] != b[i]) e++;
    return e;
  endfunction

  task automatic check_period(int k);
    int exp_p, sbw;
    // windows per sub-block; unit 0's windows set the pace
    sbw   = ((k + 31) / 32 + N_SISO - 1) / N_SISO;
    // windows stream one step per cycle; the last window's backward pass
    // drains at the end
    exp_p = 6;
    // each window is fetched for 32 cycles, except a block of one short window
    exp_p += (sbw == 1 && k < 32) ? k : 32 * sbw;
    exp_p += (k - 32 * (sbw - 1) < 32) ? k - 32 * (sbw - 1) : 32;
    foreach (half_periods[j]) begin
      checks++;
      if (half_periods[j] != exp_p) begin
        failures++;
        $display("FAIL: half-iteration period %0d, expected %0d", half_periods[j], exp_p);
      end
    end
  endtask

  task automatic decode_and_check(int k, int kf1, int kf2, real ebn0);
    int nh, errs;
    make_block(k, kf1, kf2, ebn0);
    load_block(k, kf1, kf2);
    run(16, nh);
    read_bits(k, hd_now);
    errs = count_errors(k, u, hd_now);
    checks++;
    if (errs != 0 || metrics[metrics.size() - 1] != 0) begin
      failures++;
      $display("FAIL: K=%0d Eb/N0=%0.1f: %0d bit errors after %0d half-iterations",
               k, ebn0, errs, nh);
    end else
      $display("K=%0d Eb/N0=%0.1f dB: decoded without errors in %0d half-iterations",
               k, ebn0, nh);
    check_period(k);
  endtask

  initial begin
    int nh, chg;
    ld_valid = 0; start = 0; pm_valid = 0; pm_stop = 0; rd_addr = '0;
    k_len = '0; f1 = '0; f2 = '0; ld_addr = '0; ld_sys = '0; ld_p1 = '0; ld_p2 = '0;
    void'($urandom(7));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    decode_and_check(40, 3, 10, 4.0);
    decode_and_check(1280, 199, 240, 2.0);

    // Convergence metric against read-out hard decisions, noisy block.
    make_block(1280, 199, 240, 0.6);
    hd_prev = new[1280];
    for (int i = 0; i < 1280; i++) hd_prev[i] = (sys_q[i] < 0);
    for (int h = 1; h <= 4; h++) begin
      load_block(1280, 199, 240);
      run(h, nh);
      read_bits(1280, hd_now);
      chg = count_errors(1280, hd_prev, hd_now);
      checks++;
      if (nh != h || metrics[h - 1] != chg) begin
        failures++;
        $display("FAIL: half-iteration %0d metric %0d, changed decisions %0d",
                 h, metrics[nh - 1], chg);
      end else
        $display("half-iteration %0d: %0d hard decisions changed", h, chg);
      hd_prev = hd_now;
    end

    // Timing constraint: 8 full iterations of the largest block within
    // 65 us at 266 MHz, i.e. 17290 cycles from start to done. The block is
    // too noisy to converge, so all 16 half-iterations run.
    begin
      int t0, cyc;
      make_block(6144, 263, 480, -3.0);
      load_block(6144, 263, 480);
      t0 = int'($time / 10);
      run(16, nh);
      cyc = int'($time / 10) - t0;
      checks++;
      if (nh != 16 || cyc > 17290) begin
        failures++;
        $display("FAIL: K=6144, %0d half-iterations took %0d cycles, limit 17290", nh, cyc);
      end else
        $display("K=6144: 16 half-iterations in %0d cycles (%0.1f us at 266 MHz)",
                 cyc, real'(cyc) / 266.0);
      check_period(6144);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
