// tb_qpp_interleaver: checks the incremental QPP address generator against
// the closed formula pi(i) = (f1*i + f2*i^2) mod K for LTE block lengths
// 40, 1280 and 6144 (largest), checks that each sequence is a permutation,
// that a new `init` restarts the sequence at 0, and that `load` with
// (pi(j), g(j) = (f1 + f2*(2j+1)) mod K) restarts it at index j. One address
// per step.
module tb_qpp_interleaver;
  import tb_turbo_pkg::*;

  localparam int K_MAX = 6144;
  localparam int AW    = $clog2(K_MAX + 1);

  logic          clk = 1'b0, rst_n = 1'b0, init = 1'b0, step = 1'b0, load = 1'b0;
  logic [AW-1:0] k_len = '0, f1 = '0, f2 = '0, addr, g;
  logic [AW-1:0] load_addr = '0, load_g = '0;
  int checks = 0, failures = 0;

  qpp_interleaver #(.K_MAX(K_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_k(int k, int kf1, int kf2);
    bit seen [];
    int bad = 0, dup = 0;
    seen = new[k];
    @(negedge clk); k_len = AW'(k); f1 = AW'(kf1); f2 = AW'(kf2); init = 1'b1;
    @(negedge clk); init = 1'b0; step = 1'b1;
    for (int i = 0; i < k; i++) begin
      if (int'(addr) != qpp(i, k, kf1, kf2)) begin
        if (bad < 5) $display("FAIL: K=%0d pi(%0d)=%0d expected %0d", k, i, addr, qpp(i, k, kf1, kf2));
        bad++;
      end
      if (int'(addr) < k) begin
        if (seen[addr]) dup++;
        seen[addr] = 1'b1;
      end else dup++;
      @(negedge clk);
    end
    step = 1'b0;
    // restart at index j from the pair captured there and run 50 steps
    begin
      int j, bad2;
      j = k / 3; bad2 = 0;
      load_addr = AW'(qpp(j, k, kf1, kf2));
      load_g    = AW'((kf1 + kf2 * (2 * j + 1)) % k);
      load = 1'b1;
      @(negedge clk); load = 1'b0; step = 1'b1;
      for (int i = j; i < j + 50 && i < k; i++) begin
        if (int'(addr) != qpp(i, k, kf1, kf2)) bad2++;
        @(negedge clk);
      end
      step = 1'b0;
      checks++;
      if (bad2 != 0) begin failures++; $display("FAIL: K=%0d restart at %0d: %0d mismatches", k, j, bad2); end
    end
    checks += 2;
    if (bad != 0) failures++;
    if (dup != 0) failures++;
    $display("K=%0d: %0d mismatches, %0d repeated addresses", k, bad, dup);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_k(40, 3, 10);
    run_k(1280, 199, 240);
    run_k(6144, 263, 480);
    run_k(40, 3, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
