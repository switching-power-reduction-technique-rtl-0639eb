// tb_turbo_dpm_top: end-to-end test of the decoder with dynamic power
// management, at the default parameters (K_MAX = 6144, two power modes,
// 8 full iterations per deadline).
//
// The decoder clock comes from the behavioural DVFS model, so a
// half-iteration in mode 1 really takes 266/160 times longer. Codeblocks of
// K = 1280 bits at rate 2/3 (the case the design is evaluated on; parity
// punctured to one bit in four per encoder) are decoded, two at each Eb/N0
// of -1 dB and 1.1 to 3.5 dB in 0.1 dB steps, then one K = 6144 block, the
// largest LTE length. The testbench
// checks that
//  - blocks stopped as converged at Eb/N0 >= 2.7 dB are decoded without
//    bit errors, and the largest block decodes;
//  - every task ends within the deadline (16 mode-0 half-iterations) plus
//    the DVFS transition times;
//  - each mechanism happened at least once: convergence stop, undecodable
//    stop, deadline stop, a half-iteration in the low-power mode, a return to the high-power
//    mode inside a block, and a wait for the DVFS unit to settle.
// It also prints the half-iterations and the switching energy (sum of V^2
// over decoder clock cycles) against a fixed 8-iteration decoder in mode 0.
module tb_turbo_dpm_top;
  import turbo_pkg::*;
  import tb_turbo_pkg::*;

  localparam int K_MAX = 6144;
  localparam int AW    = $clog2(K_MAX + 1);
  localparam int T_TRANS_PS = 50_000;

  logic          clk, rst_n = 1'b0;
  logic [AW-1:0] k_len = '0, f1 = '0, f2 = '0;
  logic          ld_valid = 1'b0;
  logic [AW-1:0] ld_addr = '0;
  llr_t          ld_sys = '0, ld_p1 = '0, ld_p2 = '0;
  logic          start = 1'b0, busy, done;
  logic [AW-1:0] rd_addr = '0;
  logic          rd_bit;
  logic [0:0]    power_mode;
  logic          dvfs_ready;
  stop_reason_e  stop_reason;
  logic [7:0]    halves, pred_rem;
  logic          converging, half_done;
  logic [AW-1:0] metric;
  logic [15:0]   elapsed_q8;
  int            vdd_mv, half_period_ps;

  int checks = 0, failures = 0;
  int n_conv_stop = 0, n_undec_stop = 0, n_deadline_stop = 0;
  int n_low_halves = 0, n_back_high = 0, n_dvfs_wait = 0;

  turbo_dpm_top dut (.*);

  dvfs_model #(.T_TRANS_PS(T_TRANS_PS)) u_dvfs (
    .mode (power_mode), .clk, .ready (dvfs_ready), .vdd_mv, .half_period_ps);

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // energy bookkeeping and event counts while a block is decoded
  real     e_block;
  int      n_switch;
  logic    mode_q = 1'b0;
  always @(posedge clk) begin
    if (busy) begin
      e_block += (real'(vdd_mv) / 1200.0) ** 2;
      if (!dvfs_ready) n_dvfs_wait++;
      if (half_done && power_mode == 1'b1) n_low_halves++;
    end
    if (busy && halves != 0 && mode_q == 1'b1 && power_mode == 1'b0) n_back_high++;
    if (busy && mode_q != power_mode) n_switch++;
    mode_q <= power_mode;
  end

  bit u [];
  int sys_q [], p1_q [], p2_q [];

  task automatic make_block(int k, int kf1, int kf2, real ebn0);
    bit [2:0] r1, r2;
    real s2;
    bit b1, b2;
    s2 = sigma2_of(ebn0, 2.0 / 3.0);
    u = new[k]; sys_q = new[k]; p1_q = new[k]; p2_q = new[k];
    r1 = '0; r2 = '0;
    for (int i = 0; i < k; i++) u[i] = bit'($urandom & 1);
    for (int i = 0; i < k; i++) begin
      b1 = rsc_step(r1, u[i]);
      b2 = rsc_step(r2, u[qpp(i, k, kf1, kf2)]);
      sys_q[i] = channel_llr(u[i], s2);
      p1_q[i]  = (i % 4 == 0) ? channel_llr(b1, s2) : 0;   // punctured -> 0
      p2_q[i]  = (i % 4 == 2) ? channel_llr(b2, s2) : 0;
    end
  endtask

  task automatic decode(int k, int kf1, int kf2, real ebn0, bit must_decode);
    int errs, nwin, sbw, prep_cycles, exp_half_cycles;
    realtime t0, t1, limit;
    real e_max;
    make_block(k, kf1, kf2, ebn0);
    k_len = AW'(k); f1 = AW'(kf1); f2 = AW'(kf2);
    for (int i = 0; i < k; i++) begin
      @(negedge clk);
      ld_valid = 1'b1; ld_addr = AW'(i);
      ld_sys = llr_t'(sys_q[i]); ld_p1 = llr_t'(p1_q[i]); ld_p2 = llr_t'(p2_q[i]);
    end
    @(negedge clk); ld_valid = 1'b0;
    e_block = 0.0; n_switch = 0;
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    t0 = $realtime;
    wait (done);
    t1 = $realtime;
    errs = 0;
    for (int i = 0; i < k; i++) begin
      @(negedge clk); rd_addr = AW'(i);
      @(posedge clk); #1;
      if (rd_bit != u[i]) errs++;
    end
    case (stop_reason)
      STOP_CONVERGED:   n_conv_stop++;
      STOP_UNDECODABLE: n_undec_stop++;
      STOP_DEADLINE:    n_deadline_stop++;
      default: ;
    endcase
    // deadline: the interleaver start points, then 16 half-iterations in
    // mode 0, each with its handshake cycles; six units work in parallel
    nwin            = (k + 31) / 32;
    sbw             = (nwin + 5) / 6;
    exp_half_cycles = 6 + 3;
    // each window is fetched for 32 cycles, except a block of one short window
    exp_half_cycles += (sbw == 1 && k < 32) ? k : 32 * sbw;
    exp_half_cycles += (k - 32 * (sbw - 1) < 32) ? k - 32 * (sbw - 1) : 32;
    prep_cycles     = 2 + 6 * 2 * AW;   // two 13-step products per unit
    limit = realtime'(prep_cycles + 16 * exp_half_cycles + 4) * 3760.0 +
            realtime'(n_switch * T_TRANS_PS);
    checks++;
    if (t1 - t0 > limit) begin
      failures++;
      $display("FAIL: task took %0.1f ns, deadline %0.1f ns", (t1 - t0) / 1000.0, limit / 1000.0);
    end
    if (must_decode && stop_reason == STOP_CONVERGED) begin
      checks++;
      if (errs != 0) begin
        failures++;
        $display("FAIL: K=%0d Eb/N0=%0.1f converged with %0d bit errors", k, ebn0, errs);
      end
    end
    e_max = real'(16 * exp_half_cycles);
    $display("K=%0d Eb/N0=%4.1f dB: %-16s after %2d half-iterations, %4d bit errors, %0.2f us, energy %0.3f of 8 fixed iterations",
             k, ebn0, stop_reason.name(), halves, errs, (t1 - t0) / 1.0e6, e_block / e_max);
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else
      $display("%-32s %0d", what, n);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    void'($urandom(20260));
    for (int j = 0; j <= 25; j++) begin
      real snr;
      snr = (j == 0) ? -1.0 : 1.0 + 0.1 * real'(j);
      decode(1280, 199, 240, snr, snr >= 2.7);
      decode(1280, 199, 240, snr, snr >= 2.7);
    end
    decode(6144, 263, 480, 3.0, 1'b1);
    checks++;
    if (stop_reason != STOP_CONVERGED) begin
      failures++;
      $display("FAIL: K=6144 block did not converge");
    end
    expect_seen("convergence stops", n_conv_stop);
    expect_seen("undecodable stops", n_undec_stop);
    expect_seen("half-iterations in mode 1", n_low_halves);
    expect_seen("returns to mode 0 in a block", n_back_high);
    expect_seen("cycles waiting for the DVFS", n_dvfs_wait);
    expect_seen("deadline stops", n_deadline_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
