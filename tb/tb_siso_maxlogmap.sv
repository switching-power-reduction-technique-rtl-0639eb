// tb_siso_maxlogmap: checks the SISO unit against a max-log-MAP reference
// written in the testbench (integer BCJR over the whole block, branch metric
// -u*(Ls+La) - p*Lp, trellis from the reference encoder).
//  Case 1: one window of 32 steps, equiprobable final beta.
//  Case 2: a 20-step block (partial window).
//  Case 3: a 64-step block in two windows; the first window's backward
//          recursion starts from the reference beta at step 32, so the
//          outputs must equal the full-block reference exactly, and the
//          second window must return the reference beta at its first step.
//  Case 4: one window started from arbitrary forward metrics (`alpha_init`),
//          as for a sub-block inside the codeblock.
//  Case 5: three windows streamed without idle cycles (see run_stream).
// After cases 1-4 the forward metrics `alpha_out` are checked too.
// Posterior, extrinsic (saturated to EXT_W bits), hard decision, address order
// (highest index first) and the one-output-per-cycle rate are checked.
module tb_siso_maxlogmap;
  import turbo_pkg::*;
  import tb_turbo_pkg::*;

  localparam int WIN = 32;
  localparam int AW  = 13;
  localparam int NEG = -1000000;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          blk_start = 1'b0, in_valid = 1'b0, in_old_hd = 1'b0, bwd_go = 1'b0;
  llr_t          in_sys = '0, in_par = '0;
  ext_t          in_apri = '0;
  logic [AW-1:0] in_addr = '0;
  smvec_t        beta_init, beta_first, alpha_init, alpha_out;
  logic          out_valid, out_hd, out_old_hd, win_done, busy;
  logic [AW-1:0] out_addr;
  ext_t          out_ext;
  post_t         out_post;
  int checks = 0, failures = 0;

  siso_maxlogmap #(.WIN(WIN), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference trellis tables from the reference encoder
  int nxt [8][2], par [8][2];
  int sa [], lp [], ref_post [];
  int alpha [][8], beta [][8];
  int a0 [8];                        // forward metrics at the first step

  function automatic int maxi(int a, int b); return a > b ? a : b; endfunction

  task automatic build_trellis();
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        bit [2:0] r;
        r = 3'(s);
        par[s][u] = int'(rsc_step(r, 1'(u)));
        nxt[s][u] = int'(r);
      end
  endtask

  task automatic reference(int n);
    alpha = new[n + 1]; beta = new[n + 1]; ref_post = new[n];
    for (int s = 0; s < 8; s++) begin alpha[0][s] = a0[s]; beta[n][s] = 0; end
    for (int k = 0; k < n; k++) begin
      for (int s = 0; s < 8; s++) alpha[k + 1][s] = NEG;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++)
          alpha[k + 1][nxt[s][u]] = maxi(alpha[k + 1][nxt[s][u]],
                                         alpha[k][s] - u * sa[k] - par[s][u] * lp[k]);
    end
    for (int k = n - 1; k >= 0; k--) begin
      int m0, m1;
      m0 = NEG * 4; m1 = NEG * 4;
      for (int s = 0; s < 8; s++) beta[k][s] = NEG;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int g;
          g = -u * sa[k] - par[s][u] * lp[k];
          beta[k][s] = maxi(beta[k][s], g + beta[k + 1][nxt[s][u]]);
          if (u == 0) m0 = maxi(m0, alpha[k][s] + g + beta[k + 1][nxt[s][u]]);
          else        m1 = maxi(m1, alpha[k][s] + g + beta[k + 1][nxt[s][u]]);
        end
      ref_post[k] = m0 - m1;
    end
  endtask

  localparam int EMAX = 2 ** (EXT_W - 1) - 1;

  function automatic int sat_e(int v);
    return v > EMAX ? EMAX : (v < -EMAX ? -EMAX : v);
  endfunction

  // Feed one window [first, first+len) and check its outputs.
  task automatic do_window(int first, int len, int b_start [8], ref int sys_v [], ref int apri_v []);
    int k, t0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_sys = llr_t'(sys_v[first + i]); in_apri = ext_t'(apri_v[first + i]);
      in_par = llr_t'(lp[first + i]);    in_addr = AW'(1000 + first + i);
      in_old_hd = 1'((first + i) % 3 == 0);
    end
    @(negedge clk); in_valid = 1'b0;
    for (int s = 0; s < 8; s++) beta_init[s] = sm_t'(b_start[s] - b_start[0]);
    bwd_go = 1'b1;
    @(negedge clk); bwd_go = 1'b0;
    t0 = int'($time / 10) - 1;   // cycle of the edge that sampled bwd_go
    k = first + len - 1;
    while (k >= first) begin
      @(posedge clk); #1;
      if (out_valid) begin
        checks++;
        if (int'(out_post) != ref_post[k] || int'(out_ext) != sat_e(ref_post[k] - sa[k]) ||
            out_hd != (ref_post[k] < 0) || int'(out_addr) != 1000 + k ||
            out_old_hd != 1'(k % 3 == 0)) begin
          failures++;
          $display("FAIL: step %0d post %0d (ref %0d) ext %0d addr %0d", k, out_post,
                   ref_post[k], out_ext, out_addr);
        end
        if (k == first) begin
          checks++;
          if (!win_done || int'($time / 10) - t0 != len) begin
            failures++;
            $display("FAIL: window end: win_done=%0d after %0d cycles, expected %0d",
                     win_done, int'($time / 10) - t0, len);
          end
        end
        k--;
      end
    end
  endtask

  task automatic run_case(int n, int split, bit rand_start);
    int sys_v [], apri_v [], b [8], zero [8];
    sa = new[n]; lp = new[n]; sys_v = new[n]; apri_v = new[n];
    for (int i = 0; i < n; i++) begin
      sys_v[i]  = $urandom_range(0, 62) - 31;
      apri_v[i] = $urandom_range(0, 2 * EMAX) - EMAX;
      lp[i]     = $urandom_range(0, 62) - 31;
      sa[i]     = sys_v[i] + apri_v[i];
    end
    for (int s = 0; s < 8; s++) begin
      a0[s] = rand_start ? ((s == 0) ? 0 : $urandom_range(0, 100) - 50) : ((s == 0) ? 0 : NEG);
      alpha_init[s] = rand_start ? sm_t'(a0[s]) : ((s == 0) ? sm_t'(0) : SM_UNREACH);
    end
    reference(n);
    for (int s = 0; s < 8; s++) zero[s] = 0;
    @(negedge clk); blk_start = 1'b1;
    @(negedge clk); blk_start = 1'b0;
    if (split == 0) do_window(0, n, zero, sys_v, apri_v);
    else begin
      for (int s = 0; s < 8; s++) b[s] = beta[split][s];
      do_window(0, split, b, sys_v, apri_v);
      do_window(split, n - split, zero, sys_v, apri_v);
      checks++;
      for (int s = 0; s < 8; s++)
        if (int'(beta_first[s]) != beta[split][s] - beta[split][0]) begin
          failures++;
          $display("FAIL: beta_first[%0d] %0d expected %0d", s, beta_first[s],
                   beta[split][s] - beta[split][0]);
          break;
        end
    end
    checks++;
    for (int s = 0; s < 8; s++)
      if (int'(alpha_out[s]) != alpha[n][s] - alpha[n][0]) begin
        failures++;
        $display("FAIL: alpha_out[%0d] %0d expected %0d", s, alpha_out[s], alpha[n][s] - alpha[n][0]);
        break;
      end
    $display("block of %0d steps checked", n);
  endtask

  // Case 5: three 32-step windows streamed back to back. Each window is
  // handed to the backward pass with its last forward step, starting from
  // the reference beta at its end, while the next window's forward steps
  // follow at once. The outputs must match the full-block reference and
  // come on n consecutive cycles, with win_done on each window's last.
  task automatic run_stream(int n);
    int sys_v [], apri_v [], exp_k [$], t_first, t_last, j;
    sa = new[n]; lp = new[n]; sys_v = new[n]; apri_v = new[n];
    for (int i = 0; i < n; i++) begin
      sys_v[i]  = $urandom_range(0, 62) - 31;
      apri_v[i] = $urandom_range(0, 2 * EMAX) - EMAX;
      lp[i]     = $urandom_range(0, 62) - 31;
      sa[i]     = sys_v[i] + apri_v[i];
    end
    for (int s = 0; s < 8; s++) begin
      a0[s] = (s == 0) ? 0 : NEG;
      alpha_init[s] = (s == 0) ? sm_t'(0) : SM_UNREACH;
    end
    reference(n);
    for (int w = 0; w < n / WIN; w++)
      for (int k = (w + 1) * WIN - 1; k >= w * WIN; k--) exp_k.push_back(k);
    @(negedge clk); blk_start = 1'b1;
    @(negedge clk); blk_start = 1'b0;
    t_first = -1; t_last = -1; j = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          in_valid = 1'b1;
          in_sys = llr_t'(sys_v[i]); in_apri = ext_t'(apri_v[i]);
          in_par = llr_t'(lp[i]);    in_addr = AW'(1000 + i);
          in_old_hd = 1'(i % 3 == 0);
          bwd_go = ((i + 1) % WIN == 0);
          for (int s = 0; s < 8; s++) beta_init[s] = sm_t'(beta[i + 1][s] - beta[i + 1][0]);
        end
        @(negedge clk); in_valid = 1'b0; bwd_go = 1'b0;
      end
      begin
        while (j < n) begin
          @(posedge clk); #1;
          if (out_valid) begin
            int k;
            k = exp_k[j];
            if (t_first < 0) t_first = int'($time / 10);
            t_last = int'($time / 10);
            checks++;
            if (int'(out_post) != ref_post[k] || int'(out_ext) != sat_e(ref_post[k] - sa[k]) ||
                out_hd != (ref_post[k] < 0) || int'(out_addr) != 1000 + k ||
                out_old_hd != 1'(k % 3 == 0) || win_done != (k % WIN == 0)) begin
              failures++;
              $display("FAIL: streamed step %0d post %0d (ref %0d) addr %0d win_done %0d",
                       k, out_post, ref_post[k], out_addr, win_done);
            end
            j++;
          end
        end
      end
    join
    checks++;
    if (t_last - t_first != n - 1) begin
      failures++;
      $display("FAIL: %0d streamed outputs took %0d cycles", n, t_last - t_first + 1);
    end
    $display("stream of %0d steps checked", n);
  endtask

  initial begin
    build_trellis();
    for (int s = 0; s < 8; s++) beta_init[s] = '0;
    for (int s = 0; s < 8; s++) alpha_init[s] = (s == 0) ? sm_t'(0) : SM_UNREACH;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_case(32, 0, 1'b0);
    run_case(20, 0, 1'b0);
    run_case(64, 32, 1'b0);
    run_case(32, 0, 1'b1);
    run_stream(96);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
