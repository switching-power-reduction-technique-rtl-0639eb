// power_manager: online dynamic-power-management policy for the iterative
// decoder. It watches the convergence metric (number of hard-decision
// changes in the last half-iteration), decides after every half-iteration
// whether decoding goes on, and selects the power mode (voltage/frequency
// pair of the DVFS unit) for the next half-iteration.
//
// Policy. Every codeblock starts in the fastest, highest-power mode 0. While
// the metric fluctuates (the critical period) no prediction is trusted and
// the mode stays 0. When the metric has fallen strictly in MONO_N successive
// half-iterations the block is taken to be in its convergence mode: the
// remaining work is predicted by extending the last decrease d to zero,
// rem = ceil(metric / d) half-iterations, and the slowest mode k that still
// finishes them before the deadline, elapsed + rem * ALPHA_Q8[k] <= DEADLINE,
// is chosen. A rise of the metric ends the convergence mode and restores
// mode 0. Decoding stops when the metric is zero (converged), when the
// critical period has lasted CRIT_MAX half-iterations (block judged
// undecodable), or when the next half-iteration would not end before the
// deadline even in mode 0. Time is counted in units of one half-iteration in
// mode 0, as 8.8 fixed point; ALPHA_Q8[k] is mode k's slowdown factor.
//
// What follows the design: start fast, stay fast during the critical period,
// detect the monotonic decrease, predict the remaining decoding time and pick
// the slowest mode meeting the deadline, early stopping on convergence and
// on non-convergence, two modes (1.2 V / 266 MHz and 0.9 V / 160 MHz, so
// alpha_1 = 266/160), deadline = 8 full iterations in mode 0. This design's
// own choices: the linear predictor, MONO_N, CRIT_MAX, the fixed-point time
// base and the stop-on-zero-changes rule.
//
// Interface and timing: `blk_start` resets the policy for a new codeblock
// (mode 0). `metric_valid` presents the metric of the half-iteration just
// finished; one cycle later `dec_valid` pulses with `dec_stop`, the stop
// `reason`, and `mode` already holding the mode for the next half-iteration.
module power_manager
  import turbo_pkg::*;
#(
  parameter int K_MAX     = 6144,
  parameter int N_MODES   = 2,
  parameter int MAX_HALF  = 16,            // 8 full iterations
  parameter int MONO_N    = 2,
  parameter int CRIT_MAX  = 10,
  parameter int ALPHA_Q8 [N_MODES] = '{256, 426},
  localparam int CW       = $clog2(K_MAX + 1),
  localparam int MW       = (N_MODES > 1) ? $clog2(N_MODES) : 1,
  localparam int DEADLINE_Q8 = MAX_HALF * 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          blk_start,
  input  logic          metric_valid,
  input  logic [CW-1:0] metric,
  output logic          dec_valid,
  output logic          dec_stop,
  output stop_reason_e  reason,
  output logic [MW-1:0] mode,
  output logic          converging,
  output logic [15:0]   elapsed_q8,
  output logic [7:0]    halves,
  output logic [7:0]    pred_rem
);

  logic [CW-1:0] m_prev;
  logic          have_prev;
  logic [7:0]    mono_cnt, crit_cnt;

  // next-state values, computed from the metric just presented
  logic          n_stop, n_conv;
  stop_reason_e  n_reason;
  logic [MW-1:0] n_mode;
  logic [7:0]    n_mono, n_crit, n_rem;
  logic [15:0]   n_t;

  always_comb begin
    int unsigned t_new, rem, d;
    n_stop   = 1'b0;
    n_reason = STOP_NONE;
    n_mode   = '0;
    n_rem    = '0;
    t_new    = int'(elapsed_q8) + ALPHA_Q8[mode];
    n_t      = 16'(t_new);
    if (have_prev && metric < m_prev) n_mono = mono_cnt + 1'b1;
    else                              n_mono = '0;
    n_conv = (n_mono >= 8'(MONO_N));
    n_crit = n_conv ? crit_cnt : crit_cnt + 1'b1;
    d      = int'(m_prev) - int'(metric);
    rem    = 0;
    if (metric == '0) begin
      n_stop   = 1'b1;
      n_reason = STOP_CONVERGED;
    end else if (!n_conv && n_crit >= 8'(CRIT_MAX)) begin
      n_stop   = 1'b1;
      n_reason = STOP_UNDECODABLE;
    end else begin
      if (n_conv) begin
        rem = (int'(metric) + d - 1) / d;
        if (rem > MAX_HALF) rem = MAX_HALF;
        for (int k = 0; k < N_MODES; k++)
          if (t_new + rem * ALPHA_Q8[k] <= DEADLINE_Q8) n_mode = MW'(k);
      end
      if (t_new + ALPHA_Q8[n_mode] > DEADLINE_Q8) n_mode = '0;
      if (t_new + ALPHA_Q8[0] > DEADLINE_Q8) begin
        n_stop   = 1'b1;
        n_reason = STOP_DEADLINE;
      end
    end
    n_rem = 8'(rem);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_prev     <= '0;
      have_prev  <= 1'b0;
      mono_cnt   <= '0;
      crit_cnt   <= '0;
      mode       <= '0;
      converging <= 1'b0;
      elapsed_q8 <= '0;
      halves     <= '0;
      pred_rem   <= '0;
      dec_valid  <= 1'b0;
      dec_stop   <= 1'b0;
      reason     <= STOP_NONE;
    end else begin
      dec_valid <= 1'b0;
      if (blk_start) begin
        m_prev     <= '0;
        have_prev  <= 1'b0;
        mono_cnt   <= '0;
        crit_cnt   <= '0;
        mode       <= '0;
        converging <= 1'b0;
        elapsed_q8 <= '0;
        halves     <= '0;
        pred_rem   <= '0;
        dec_stop   <= 1'b0;
        reason     <= STOP_NONE;
      end else if (metric_valid) begin
        m_prev     <= metric;
        have_prev  <= 1'b1;
        mono_cnt   <= n_mono;
        crit_cnt   <= n_crit;
        converging <= n_conv;
        elapsed_q8 <= n_t;
        halves     <= halves + 1'b1;
        pred_rem   <= n_rem;
        dec_valid  <= 1'b1;
        dec_stop   <= n_stop;
        reason     <= n_reason;
        if (!n_stop) mode <= n_mode;
      end
    end
  end

endmodule
