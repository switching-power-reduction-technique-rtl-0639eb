// turbo_dpm_top: turbo decoder with dynamic power management.
//
// The iterative decoder runs one half-iteration at a time; after each one
// it hands its convergence metric (hard-decision changes) to the power
// manager, which decides whether to continue and in which power mode. The
// mode goes out on `power_mode` to the DVFS unit (an on-chip regulator and
// clock source outside this module), which sets the supply and delivers
// `clk` at the matching frequency. A half-iteration in a new mode starts
// only when the DVFS unit reports `dvfs_ready`, so no work is done while the
// supply is moving. The host loads the channel LLRs, starts the block and
// reads the decoded bits; the status outputs say how the task ended.
//
// The structure (decoder, power manager watching the decoder's metric,
// DVFS unit governed by the power manager) follows the design; the DVFS
// handshake (`power_mode` / `dvfs_ready`) and host interface are this
// design's own choices.
//
// Timing: `start` is taken while not busy; `done` stays high from the end of
// the block until the next `start`. rd_bit follows rd_addr by one cycle.
module turbo_dpm_top
  import turbo_pkg::*;
#(
  parameter int K_MAX     = 6144,
  parameter int WIN       = 32,
  parameter int N_SISO    = 6,
  parameter int N_MODES   = 2,
  parameter int MAX_HALF  = 16,
  parameter int MONO_N    = 2,
  parameter int CRIT_MAX  = 10,
  parameter int ALPHA_Q8 [N_MODES] = '{256, 426},
  localparam int AW       = $clog2(K_MAX + 1),
  localparam int MW       = (N_MODES > 1) ? $clog2(N_MODES) : 1
) (
  input  logic          clk,          // decoder clock, from the DVFS unit
  input  logic          rst_n,
  // block configuration
  input  logic [AW-1:0] k_len,
  input  logic [AW-1:0] f1,
  input  logic [AW-1:0] f2,
  // channel LLRs
  input  logic          ld_valid,
  input  logic [AW-1:0] ld_addr,
  input  llr_t          ld_sys,
  input  llr_t          ld_p1,
  input  llr_t          ld_p2,
  // task control and decoded bits
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_bit,
  // DVFS unit
  output logic [MW-1:0] power_mode,
  input  logic          dvfs_ready,
  // status
  output stop_reason_e  stop_reason,
  output logic [7:0]    halves,
  output logic          converging,
  output logic [AW-1:0] metric,
  output logic          half_done,
  output logic [15:0]   elapsed_q8,   // task time, in mode-0 half-iterations (8.8)
  output logic [7:0]    pred_rem      // predicted remaining half-iterations
);

  logic          dec_valid, dec_stop, pending, pm_go;

  turbo_decoder #(.K_MAX(K_MAX), .WIN(WIN), .N_SISO(N_SISO)) u_dec (
    .clk, .rst_n,
    .k_len, .f1, .f2,
    .ld_valid, .ld_addr, .ld_sys, .ld_p1, .ld_p2,
    .start, .busy, .done,
    .half_done,
    .metric,
    .pm_valid (pm_go),
    .pm_stop  (dec_stop),
    .rd_addr, .rd_bit
  );

  power_manager #(
    .K_MAX(K_MAX), .N_MODES(N_MODES), .MAX_HALF(MAX_HALF),
    .MONO_N(MONO_N), .CRIT_MAX(CRIT_MAX), .ALPHA_Q8(ALPHA_Q8)
  ) u_pm (
    .clk, .rst_n,
    .blk_start    (start && !busy),
    .metric_valid (half_done),
    .metric,
    .dec_valid, .dec_stop,
    .reason       (stop_reason),
    .mode         (power_mode),
    .converging,
    .elapsed_q8,
    .halves,
    .pred_rem
  );

  // Hold the decision until the DVFS unit has settled in the chosen mode.
  assign pm_go = pending && (dec_stop || dvfs_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          pending <= 1'b0;
    else if (dec_valid)  pending <= 1'b1;
    else if (pm_go)      pending <= 1'b0;
  end

endmodule
