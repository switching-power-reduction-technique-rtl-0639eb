// tb_hd_change_counter: drives random old/new hard-decision pairs on all
// six lanes, with gaps, and checks the registered count against a count kept by the
// testbench, after each of several half-iterations separated by `clear`.
module tb_hd_change_counter;

  localparam int K_MAX = 6144;
  localparam int CW    = $clog2(K_MAX + 1);
  localparam int NL    = 6;

  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [NL-1:0] valid = '0, old_hd = '0, new_hd = '0;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;

  hd_change_counter dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, n;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < 8; h++) begin
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      checks++;
      if (count != 0) begin failures++; $display("FAIL: count not cleared"); end
      expected = 0;
      n = 20 + 120 * h;
      for (int i = 0; i < n; i++) begin
        for (int l = 0; l < NL; l++) begin
          valid[l]  = ($urandom_range(0, 3) != 0);
          old_hd[l] = 1'($urandom);
          new_hd[l] = (h == 0) ? old_hd[l] : 1'($urandom);   // h=0: no change
          if (valid[l] && old_hd[l] != new_hd[l]) expected++;
        end
        @(negedge clk);
      end
      valid = '0;
      @(negedge clk);
      checks++;
      if (int'(count) != expected) begin
        failures++;
        $display("FAIL: half %0d count %0d expected %0d", h, count, expected);
      end else
        $display("half %0d: %0d changes counted", h, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
