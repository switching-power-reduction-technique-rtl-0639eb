// turbo_decoder: iterative decoder for the LTE turbo code (two parallel
// concatenated 8-state RSC codes separated by a QPP interleaver), decoding
// one codeblock in half-iterations under the control of a power manager.
//
// How it works. The host writes the channel LLRs of a codeblock (systematic,
// parity 1, parity 2; punctured positions as 0) into the input memories and
// pulses `start`. The block is split into N_SISO sub-blocks of equal length
// SB (a whole number of WIN-step windows, SB = ceil(ceil(K/WIN)/N_SISO)*WIN);
// SISO unit p decodes steps [p*SB, (p+1)*SB) and all units work in lockstep,
// window by window. Odd half-iterations (the first MAP decoder) read the
// systematic and extrinsic memories in natural order with parity 1; even ones
// (the second MAP decoder) read them at the interleaved address pi(i) with
// parity 2. The extrinsic memory always holds one LLR per bit in natural
// order; each half-iteration overwrites it in place with its own extrinsic
// output, the a-priori input of the next one. Since each bit belongs to one
// unit and the interleaver is a permutation, the N_SISO accesses of a cycle
// never collide; the memories have one read and one write port per unit.
// The hard decision of every bit's posterior LLR is written to a
// hard-decision memory, and a counter reports how many changed during the
// half-iteration (the convergence metric). After each half-iteration the
// decoder pulses `half_done` with that metric and waits for the power
// manager's answer: continue or stop. When it stops, `done` rises and the
// decoded bits are read through rd_addr/rd_bit.
//
// Boundaries. Inside a sub-block the forward recursion runs continuously.
// A sub-block p > 0 starts its forward recursion from the forward metrics
// unit p-1 reached at the end of its sub-block in the previous iteration of
// the same half (equiprobable the first time). The backward recursion of a
// window starts from the beta found at the start of the following window:
// from the previous iteration inside a sub-block, from the beta unit p+1
// found at its sub-block start (earlier in the same half-iteration) across
// a sub-block boundary, and equiprobable at the end of the block (the
// trellis is treated as unterminated) and where no earlier value exists.
// Before the first half-iteration, each unit's interleaver start point is
// computed from the sub-block start s: t = f2*s mod K, pi(s) = s*(f1+t)
// mod K and the increment g(s) = (f1 + f2 + 2t) mod K, with products done
// by double-and-add, one bit per cycle (f1, f2 < K).
//
// Each SISO unit has two window buffers, so the backward pass of a window
// runs while the forward recursion takes in the next one.
//
// What follows the design: max-log-MAP SISO decoding in half-iterations,
// six radix-2 SISO units, window length 32, 6-bit messages, the
// hard-decision change metric, stopping under external control. This
// design's own choices: the sub-block split and boundary scheme, memory
// organisation, the unterminated trellis, the start-point computation,
// the host and power-manager handshakes, and the window pipelining.
//
// Timing: the start points take 2*AW cycles per unit, 2 + N_SISO*2*AW
// in all (158 for the defaults), once per block. Windows stream at one
// step per cycle: a window is handed to the backward pass with its last
// forward step, and the next window's forward steps follow at once. A
// half-iteration of a sub-block whose windows hold L steps in all (unit
// 0's) takes L + (length of the last window) + 6 cycles between
// `half_done` pulses when the power manager answers at once: 262 cycles
// for K = 1280 and 1062 for K = 6144. `half_done` is a one-cycle pulse;
// `pm_valid` may come any later cycle, or the same cycle.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int K_MAX  = 6144,
  parameter int WIN    = 32,
  parameter int N_SISO = 6,
  localparam int AW    = $clog2(K_MAX + 1),
  localparam int XW    = AW + 1,
  localparam int RA    = $clog2(K_MAX),
  localparam int NWIN  = (K_MAX + WIN - 1) / WIN,
  localparam int NWS   = (NWIN + N_SISO - 1) / N_SISO,
  localparam int WW    = $clog2(NWS + 1),
  localparam int PW    = (N_SISO > 1) ? $clog2(N_SISO) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // block configuration (stable from start to done)
  input  logic [AW-1:0] k_len,
  input  logic [AW-1:0] f1,
  input  logic [AW-1:0] f2,
  // channel LLR loading, allowed while not busy
  input  logic          ld_valid,
  input  logic [AW-1:0] ld_addr,
  input  llr_t          ld_sys,
  input  llr_t          ld_p1,
  input  llr_t          ld_p2,
  // control
  input  logic          start,
  output logic          busy,
  output logic          done,
  // power-manager handshake
  output logic          half_done,
  output logic [AW-1:0] metric,
  input  logic          pm_valid,
  input  logic          pm_stop,
  // decoded bits
  input  logic [AW-1:0] rd_addr,
  output logic          rd_bit
);

  localparam int NP = N_SISO;

  typedef enum logic [3:0] {
    S_IDLE, S_PREP, S_QPASS, S_START_HALF, S_FETCH, S_DRAIN,
    S_HALF_END, S_REPORT, S_WAIT_PM, S_DONE
  } state_e;

  state_e        state;
  logic          half;                 // 0: first MAP decoder, 1: second
  logic [WW-1:0] w_q;                  // window being fetched
  logic [WW-1:0] bg_w, bw_n, bw_q;     // window handed over / walked back
  logic          bg_last, sba_cap;
  logic [NP-1:0] bg, bg_d;             // backward start per unit
  logic          fetch_last;
  logic [WW-1:0] sbw_q;                // windows per sub-block
  logic [AW-1:0] pos;                  // position inside the window
  logic [AW-1:0] win_len0;             // length of unit 0's current window

  logic [XW-1:0] st_q   [NP];          // sub-block start step
  logic [XW-1:0] wst    [NP];          // current window's first step
  logic [AW-1:0] i_q    [NP];          // step being fetched
  logic [NP-1:0] has_data, last_blk;

  // ---------------- sub-block geometry ----------------
  logic [WW-1:0] sbw_calc;
  always_comb begin
    int nw;
    nw       = (int'(k_len) + WIN - 1) / WIN;
    sbw_calc = WW'((nw + NP - 1) / NP);
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      wst[p]      = st_q[p] + XW'(int'(w_q) * WIN);
      has_data[p] = wst[p] < XW'(k_len);
      last_blk[p] = (wst[p] + XW'(WIN)) >= XW'(k_len);
    end
    // fetch cycles of the window: a full WIN except for a block of a single
    // short window, so that a short last window is never handed over before
    // the previous window's backward pass has ended
    win_len0 = (last_blk[0] && w_q == '0) ? AW'(XW'(k_len) - wst[0]) : AW'(WIN);
  end

  // ---------------- interleaver start points, one generator per unit -----
  // For each sub-block start s: t = f2*s mod K, pi(s) = s*(f1 + t) mod K and
  // g(s) = pi(s+1) - pi(s) = (f1 + f2 + 2t) mod K, each product by AW
  // double-and-add steps (one per cycle, most significant bit first).
  localparam int BCW = $clog2(AW);

  logic [AW-1:0]  pi0 [NP];
  logic [AW-1:0]  g0  [NP];
  logic [PW-1:0]  mp;                  // unit whose start point is computed
  logic           mstep;               // 0: t = f2*s, 1: pi = s*(f1+t)
  logic [BCW-1:0] bitc;
  logic [AW-1:0]  acc, acc_nx, t_q, s_cur, op_a, op_b;

  function automatic logic [AW-1:0] amod(logic [AW-1:0] x, logic [AW-1:0] y,
                                         logic [AW-1:0] k);
    logic [XW-1:0] t;
    t = XW'(x) + XW'(y);
    return (t >= XW'(k)) ? AW'(t - XW'(k)) : AW'(t);
  endfunction

  always_comb begin
    s_cur  = (st_q[mp] < XW'(k_len)) ? AW'(st_q[mp]) : '0;
    op_a   = mstep ? s_cur : f2;
    op_b   = mstep ? amod(f1, t_q, k_len) : s_cur;
    acc_nx = amod(amod(acc, acc, k_len), op_b[bitc] ? op_a : '0, k_len);
  end

  logic          qpp_load, qpp_step;
  logic [AW-1:0] pi_addr [NP];

  // ---------------- memories ----------------
  logic [NP-1:0][RA-1:0]    a_rd, i_rd, w_addr;
  logic [NP-1:0]            fv_d;
  logic [AW-1:0]            a_d [NP];
  logic                     half_d;
  logic [NP-1:0][LLR_W-1:0] sys_q, p1_q, p2_q, sys_wd, p1_wd, p2_wd;
  logic [NP-1:0][EXT_W-1:0] ext_q, ext_wd;
  logic [NP-1:0][0:0]       hd_q, hd_wd;
  logic [NP-1:0][RA-1:0]    hd_ra;
  logic [NP-1:0]            in_we, ext_we;

  logic [NP-1:0]            dec_we, dec_hd, dec_old_hd;
  logic [AW-1:0]            dec_waddr [NP];
  ext_t                     dec_ext [NP];

  logic mem_we_in;
  assign mem_we_in = ld_valid && !busy;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      a_rd[p]   = RA'(half ? pi_addr[p] : i_q[p]);
      i_rd[p]   = RA'(i_q[p]);
      hd_ra[p]  = a_rd[p];
      in_we[p]  = 1'b0;
      ext_we[p] = dec_we[p];
      w_addr[p] = RA'(dec_waddr[p]);
      sys_wd[p] = ld_sys;
      p1_wd[p]  = ld_p1;
      p2_wd[p]  = ld_p2;
      ext_wd[p] = dec_ext[p];
      hd_wd[p]  = dec_hd[p];
    end
    // port 0 also serves loading and readout while the decoder is idle
    if (mem_we_in) begin
      in_we[0]  = 1'b1;
      ext_we[0] = 1'b1;
      w_addr[0] = RA'(ld_addr);
      ext_wd[0] = '0;
      hd_wd[0]  = ld_sys[LLR_W-1];
    end
    if (!busy) hd_ra[0] = RA'(rd_addr);
  end

  assign rd_bit = hd_q[0];

  ram_mp #(.DEPTH(K_MAX), .W(LLR_W), .NP(NP)) u_sys (
    .clk, .we(in_we), .waddr(w_addr), .wdata(sys_wd), .raddr(a_rd), .rdata(sys_q));
  ram_mp #(.DEPTH(K_MAX), .W(LLR_W), .NP(NP)) u_p1 (
    .clk, .we(in_we), .waddr(w_addr), .wdata(p1_wd), .raddr(i_rd), .rdata(p1_q));
  ram_mp #(.DEPTH(K_MAX), .W(LLR_W), .NP(NP)) u_p2 (
    .clk, .we(in_we), .waddr(w_addr), .wdata(p2_wd), .raddr(i_rd), .rdata(p2_q));
  ram_mp #(.DEPTH(K_MAX), .W(EXT_W), .NP(NP)) u_ext (
    .clk, .we(ext_we), .waddr(w_addr), .wdata(ext_wd), .raddr(a_rd), .rdata(ext_q));
  ram_mp #(.DEPTH(K_MAX), .W(1), .NP(NP)) u_hd (
    .clk, .we(ext_we), .waddr(w_addr), .wdata(hd_wd), .raddr(hd_ra), .rdata(hd_q));

  // ---------------- SISO units with their boundary memories ----------------
  localparam int BW = NSTATE * SM_W;
  localparam int BA = $clog2(2 * NWS);

  logic          blk_start, fetch_on;
  logic [NP-1:0] bwd_go, win_done, bnd_use, siso_busy;
  smvec_t        alpha_init [NP];
  smvec_t        alpha_out  [NP];
  smvec_t        beta_init  [NP];
  smvec_t        beta_first [NP];

  // forward metrics at sub-block starts, per half; beta at sub-block starts
  smvec_t        sba [2][NP];
  smvec_t        sbb [2][NP];
  logic [NP-1:0] sba_valid [2];
  logic [NP-1:0] sbb_valid [2];
  logic [NP-1:0] sbb_use;
  logic [(1 << WW)-1:0] bnd_valid [NP][2];

  for (genvar p = 0; p < NP; p++) begin : g_unit
    logic [BW-1:0] bnd_wdata, bnd_rdata;
    logic [BA-1:0] bnd_waddr, bnd_raddr;

    qpp_interleaver #(.K_MAX(K_MAX)) u_qpp (
      .clk, .rst_n,
      .init (1'b0), .load (qpp_load), .step (qpp_step),
      .k_len, .f1, .f2, .load_addr (pi0[p]), .load_g (g0[p]),
      .addr (pi_addr[p]), .g ()
    );

    siso_maxlogmap #(.WIN(WIN), .AW(AW)) u_siso (
      .clk, .rst_n,
      .blk_start,
      .alpha_init (alpha_init[p]),
      .in_valid   (fv_d[p]),
      .in_sys     (llr_t'(sys_q[p])),
      .in_apri    (ext_t'(ext_q[p])),
      .in_par     (llr_t'(half_d ? p2_q[p] : p1_q[p])),
      .in_addr    (a_d[p]),
      .in_old_hd  (hd_q[p][0]),
      .bwd_go     (bwd_go[p]),
      .beta_init  (beta_init[p]),
      .out_valid  (dec_we[p]),
      .out_addr   (dec_waddr[p]),
      .out_ext    (dec_ext[p]),
      .out_post   (),
      .out_hd     (dec_hd[p]),
      .out_old_hd (dec_old_hd[p]),
      .win_done   (win_done[p]),
      .beta_first (beta_first[p]),
      .alpha_out  (alpha_out[p]),
      .busy       (siso_busy[p])
    );

    // one word of NSTATE metrics per window and half, address {half, w}
    assign bnd_waddr = BA'(int'(half) * NWS + int'(bw_q));
    assign bnd_raddr = BA'(int'(half) * NWS + int'(w_q) + 1);

    always_comb
      for (int s = 0; s < NSTATE; s++) bnd_wdata[s*SM_W +: SM_W] = beta_first[p][s];

    ram_1r1w #(.DEPTH(2 * NWS), .W(BW)) u_bnd (
      .clk, .we(win_done[p]), .waddr(bnd_waddr), .wdata(bnd_wdata),
      .raddr(bnd_raddr), .rdata(bnd_rdata));

    always_comb begin
      for (int s = 0; s < NSTATE; s++) begin
        beta_init[p][s] = '0;
        if (bnd_use[p])      beta_init[p][s] = sm_t'(bnd_rdata[s*SM_W +: SM_W]);
        else if (sbb_use[p]) beta_init[p][s] = sbb[half][(p + 1) % NP][s];
      end
      for (int s = 0; s < NSTATE; s++) begin
        if (p == 0)                alpha_init[p][s] = (s == 0) ? sm_t'(0) : SM_UNREACH;
        else if (sba_valid[half][p]) alpha_init[p][s] = sba[half][p][s];
        else                       alpha_init[p][s] = '0;
      end
    end
  end

  // ---------------- convergence metric ----------------
  logic metric_clear;

  hd_change_counter #(.K_MAX(K_MAX), .NL(NP)) u_metric (
    .clk, .rst_n,
    .clear  (metric_clear),
    .valid  (dec_we),
    .old_hd (dec_old_hd),
    .new_hd (dec_hd),
    .count  (metric)
  );

  // ---------------- control ----------------
  assign qpp_load     = (state == S_START_HALF);
  assign qpp_step     = (state == S_FETCH);
  assign blk_start    = (state == S_START_HALF);
  assign metric_clear = (state == S_START_HALF);
  assign fetch_on     = (state == S_FETCH);
  assign half_done    = (state == S_REPORT);
  assign busy         = (state != S_IDLE) && (state != S_DONE);
  assign done         = (state == S_DONE);

  assign fetch_last = (state == S_FETCH) && (pos == win_len0 - 1'b1);
  assign bwd_go     = bg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      half   <= 1'b0;
      half_d <= 1'b0;
      w_q    <= '0;
      sbw_q  <= '0;
      pos    <= '0;
      mp     <= '0;
      mstep  <= 1'b0;
      bitc   <= '0;
      acc    <= '0;
      t_q    <= '0;
      fv_d   <= '0;
      bg     <= '0;
      bg_d   <= '0;
      bg_w   <= '0;
      bw_n   <= '0;
      bw_q   <= '0;
      bg_last <= 1'b0;
      sba_cap <= 1'b0;
      bnd_use <= '0;
      sbb_use <= '0;
      for (int h = 0; h < 2; h++) begin
        sba_valid[h] <= '0;
        sbb_valid[h] <= '0;
      end
      for (int p = 0; p < NP; p++) begin
        st_q[p] <= '0;
        i_q[p]  <= '0;
        a_d[p]  <= '0;
        pi0[p]  <= '0;
        g0[p]   <= '0;
        for (int h = 0; h < 2; h++) bnd_valid[p][h] <= '0;
      end
    end else begin
      half_d <= half;
      // backward starts: decided on a window's last fetch, issued with its
      // last forward step one cycle later
      bg_d    <= bg;
      sba_cap <= (|bg) && bg_last;
      // the previous window's win_done comes one cycle after the next bwd_go
      if (|bg) bw_n <= bg_w;
      bw_q <= bw_n;
      bg <= '0;
      if (fetch_last) begin
        bg_w    <= w_q;
        bg_last <= (w_q + 1'b1 == sbw_q);
        for (int p = 0; p < NP; p++) begin
          bg[p]      <= has_data[p];
          bnd_use[p] <= !last_blk[p] && (w_q + 1'b1 < sbw_q) && bnd_valid[p][half][w_q + 1'b1];
          sbb_use[p] <= !last_blk[p] && (w_q + 1'b1 == sbw_q) && (p + 1 < NP) &&
                        sbb_valid[half][(p + 1) % NP];
        end
      end
      // end of sub-block p: its forward metrics start sub-block p+1 next time
      if (sba_cap)
        for (int p = 0; p + 1 < NP; p++)
          if (bg_d[p]) begin
            sba[half][p + 1]       <= alpha_out[p];
            sba_valid[half][p + 1] <= 1'b1;
          end
      for (int p = 0; p < NP; p++) begin
        fv_d[p] <= fetch_on && (i_q[p] < k_len);
        a_d[p]  <= AW'(a_rd[p]);
        if (win_done[p]) begin
          bnd_valid[p][half][bw_q] <= 1'b1;
          if (bw_q == '0) begin
            sbb[half][p]       <= beta_first[p];
            sbb_valid[half][p] <= 1'b1;
          end
        end
      end

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            half  <= 1'b0;
            state <= S_PREP;
            for (int h = 0; h < 2; h++) begin
              sba_valid[h] <= '0;
              sbb_valid[h] <= '0;
            end
            for (int p = 0; p < NP; p++)
              for (int h = 0; h < 2; h++) bnd_valid[p][h] <= '0;
          end
        end
        S_PREP: begin
          sbw_q <= sbw_calc;
          for (int p = 0; p < NP; p++)
            st_q[p] <= XW'(p * WIN * int'(sbw_calc));
          mp     <= '0;
          mstep  <= 1'b0;
          bitc   <= BCW'(AW - 1);
          acc    <= '0;
          state  <= S_QPASS;
        end
        S_QPASS: begin
          if (bitc != '0) begin
            acc  <= acc_nx;
            bitc <= bitc - 1'b1;
          end else begin
            acc  <= '0;
            bitc <= BCW'(AW - 1);
            if (!mstep) begin
              t_q    <= acc_nx;
              g0[mp] <= amod(amod(f1, f2, k_len), amod(acc_nx, acc_nx, k_len), k_len);
              mstep  <= 1'b1;
            end else begin
              pi0[mp] <= acc_nx;
              mstep   <= 1'b0;
              if (int'(mp) == NP - 1) state <= S_START_HALF;
              else                    mp <= mp + 1'b1;
            end
          end
        end
        S_START_HALF: begin
          w_q <= '0;
          pos <= '0;
          for (int p = 0; p < NP; p++) i_q[p] <= AW'(st_q[p]);
          state <= S_FETCH;
        end
        S_FETCH: begin
          for (int p = 0; p < NP; p++) i_q[p] <= i_q[p] + 1'b1;
          if (pos == win_len0 - 1'b1) begin
            pos   <= '0;
            if (w_q + 1'b1 == sbw_q) state <= S_DRAIN;
            else                     w_q   <= w_q + 1'b1;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        S_DRAIN: begin
          if (bg == '0 && !sba_cap && siso_busy == '0 && win_done == '0)
            state <= S_HALF_END;
        end
        S_HALF_END: state <= S_REPORT;
        S_REPORT, S_WAIT_PM: begin
          if (pm_valid) begin
            if (pm_stop) begin
              state <= S_DONE;
            end else begin
              half  <= ~half;
              state <= S_START_HALF;
            end
          end else begin
            state <= S_WAIT_PM;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         !(ld_valid && busy));

endmodule
