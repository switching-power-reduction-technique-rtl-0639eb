// tb_power_manager: feeds the power manager metric sequences whose outcome
// was worked out by hand from the policy (two modes, alpha = 1 and 426/256,
// deadline 16 half-iterations in mode 0, MONO_N = 2, CRIT_MAX = 10) and
// checks stop, stop reason, mode, prediction and elapsed time after every
// half-iteration, and that each decision comes one cycle after the metric.
//  A: converging block: mode 1 once the decrease is seen, stop at metric 0.
//  B: fluctuating block: stopped as undecodable after 10 half-iterations.
//  C: slowly converging block: prediction never allows mode 1; deadline
//     stop after 16 half-iterations.
//  D: convergence mode left again when the metric rises: back to mode 0.
module tb_power_manager;
  import turbo_pkg::*;

  localparam int K_MAX = 6144;
  localparam int CW    = $clog2(K_MAX + 1);

  logic          clk = 1'b0, rst_n = 1'b0, blk_start = 1'b0, metric_valid = 1'b0;
  logic [CW-1:0] metric = '0;
  logic          dec_valid, dec_stop, converging;
  stop_reason_e  reason;
  logic [0:0]    mode;
  logic [15:0]   elapsed_q8;
  logic [7:0]    halves, pred_rem;
  int checks = 0, failures = 0;

  power_manager #(.K_MAX(K_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one half-iteration: present metric m, expect (stop, reason, mode, time)
  task automatic step(string name, int h, int m, bit e_stop, stop_reason_e e_reason,
                      int e_mode, int e_t, int e_rem);
    @(negedge clk); metric = CW'(m); metric_valid = 1'b1;
    @(negedge clk); metric_valid = 1'b0;
    checks++;
    if (!dec_valid || dec_stop != e_stop || reason != e_reason ||
        (!e_stop && int'(mode) != e_mode) || int'(elapsed_q8) != e_t ||
        (e_rem >= 0 && int'(pred_rem) != e_rem) || int'(halves) != h) begin
      failures++;
      $display("FAIL %s h%0d: valid=%0d stop=%0d reason=%s mode=%0d t=%0d rem=%0d",
               name, h, dec_valid, dec_stop, reason.name(), mode, elapsed_q8, pred_rem);
    end
  endtask

  task automatic new_block();
    @(negedge clk); blk_start = 1'b1;
    @(negedge clk); blk_start = 1'b0;
    checks++;
    if (mode != 0 || elapsed_q8 != 0) begin failures++; $display("FAIL: reset"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    new_block();                      // A
    step("A", 1, 500, 0, STOP_NONE, 0,  256, 0);
    step("A", 2, 600, 0, STOP_NONE, 0,  512, 0);
    step("A", 3, 400, 0, STOP_NONE, 0,  768, 0);
    step("A", 4, 200, 0, STOP_NONE, 1, 1024, 1);   // d=200: 1 more half, mode 1 fits
    step("A", 5, 100, 0, STOP_NONE, 1, 1450, 1);   // that half took 426/256
    step("A", 6,   0, 1, STOP_CONVERGED, 0, 1876, -1);

    new_block();                      // B
    for (int h = 1; h <= 9; h++)
      step("B", h, (h % 2) ? 300 + h : 290 - h, 0, STOP_NONE, 0, 256 * h, 0);
    step("B", 10, 280, 1, STOP_UNDECODABLE, 0, 2560, -1);

    new_block();                      // C
    for (int h = 1; h <= 15; h++)
      step("C", h, 1000 - 10 * h, 0, STOP_NONE, 0, 256 * h, -1);
    step("C", 16, 830, 1, STOP_DEADLINE, 0, 4096, -1);

    new_block();                      // D
    step("D", 1, 400, 0, STOP_NONE, 0,  256, 0);
    step("D", 2, 300, 0, STOP_NONE, 0,  512, 0);
    step("D", 3, 200, 0, STOP_NONE, 1,  768, 2);   // d=100: 2 more, mode 1 fits
    step("D", 4, 250, 0, STOP_NONE, 0, 1194, 0);   // rise: back to mode 0
    step("D", 5, 240, 0, STOP_NONE, 0, 1450, 0);
    checks++;
    if (converging) begin failures++; $display("FAIL: D still converging"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
