// tb_metric_trace: convergence-metric traces of K = 6144 codeblocks at rate
// 2/3 with up to 20 full iterations, the setting in which the metric's
// behaviour (fluctuation for undecodable blocks, fluctuation followed by a
// monotonic fall for decodable ones) is characterised.
//
// The system is run with MAX_HALF = 40 (20 full iterations) and the
// undecodable stop pushed out to 40 half-iterations, so that the whole trace
// is seen. The metric of every half-iteration is printed with the power mode
// chosen after it. A block at 1 dB (beyond this max-log decoder's reach at
// rate 2/3) must run to the deadline (40 mode-0 half-iterations, fewer if
// some ran in mode 1) without converging; a block at
// 2.5 dB must converge, decode without errors, end with at least MONO_N
// strictly falling metrics, and finish part of the work in mode 1.
module tb_metric_trace;
  import turbo_pkg::*;
  import tb_turbo_pkg::*;

  localparam int K_MAX = 6144;
  localparam int AW    = $clog2(K_MAX + 1);
  localparam int K     = 6144;

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

  turbo_dpm_top #(.MAX_HALF(40), .CRIT_MAX(40)) dut (.*);

  dvfs_model u_dvfs (.mode (power_mode), .clk, .ready (dvfs_ready), .vdd_mv, .half_period_ps);

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int trace [$];
  int low_halves;
  always @(posedge clk) if (half_done) trace.push_back(int'(metric));
  always @(posedge clk) if (busy && half_done && power_mode == 1'b1) low_halves++;

  task automatic run_block(real ebn0, output int errs);
    bit u [];
    bit [2:0] r1, r2;
    real s2;
    string line;
    s2 = sigma2_of(ebn0, 2.0 / 3.0);
    u = new[K];
    r1 = '0; r2 = '0;
    for (int i = 0; i < K; i++) u[i] = bit'($urandom & 1);
    k_len = AW'(K); f1 = AW'(263); f2 = AW'(480);
    for (int i = 0; i < K; i++) begin
      bit b1, b2;
      b1 = rsc_step(r1, u[i]);
      b2 = rsc_step(r2, u[qpp(i, K, 263, 480)]);
      @(negedge clk);
      ld_valid = 1'b1; ld_addr = AW'(i);
      ld_sys = llr_t'(channel_llr(u[i], s2));
      ld_p1  = llr_t'((i % 4 == 0) ? channel_llr(b1, s2) : 0);
      ld_p2  = llr_t'((i % 4 == 2) ? channel_llr(b2, s2) : 0);
    end
    @(negedge clk); ld_valid = 1'b0;
    trace.delete(); low_halves = 0;
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done);
    errs = 0;
    for (int i = 0; i < K; i++) begin
      @(negedge clk); rd_addr = AW'(i);
      @(posedge clk); #1;
      if (rd_bit != u[i]) errs++;
    end
    line = "";
    foreach (trace[j]) line = {line, $sformatf(" %0d", trace[j])};
    $display("Eb/N0 %0.1f dB: %s after %0d half-iterations, %0d bit errors, %0d in mode 1",
             ebn0, stop_reason.name(), halves, errs, low_halves);
    $display("  metric per half-iteration:%s", line);
  endtask

  initial begin
    int errs, n;
    void'($urandom(31));
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    run_block(1.0, errs);
    checks++;
    if (stop_reason != STOP_DEADLINE || trace.size() < 38 || trace[trace.size() - 1] == 0) begin
      failures++;
      $display("FAIL: 1 dB block expected to run to the deadline unconverged");
    end

    run_block(2.5, errs);
    n = trace.size();
    checks++;
    if (stop_reason != STOP_CONVERGED || errs != 0 || trace[n - 1] != 0) begin
      failures++;
      $display("FAIL: 2.5 dB block did not decode");
    end
    checks++;
    if (n < 3 || !(trace[n - 3] > trace[n - 2] && trace[n - 2] > trace[n - 1])) begin
      failures++;
      $display("FAIL: trace does not end in a monotonic fall");
    end
    checks++;
    if (low_halves == 0) begin
      failures++;
      $display("FAIL: no half-iteration in mode 1");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
