// siso_maxlogmap: soft-input soft-output MAP unit of the turbo decoder, in the
// logarithmic domain with the max-log approximation, radix-2 (one trellis
// step per clock) and processing the block in windows of WIN = 32 steps.
//
// How it works. The forward recursion runs continuously over the whole
// block: for each step the unit receives the systematic LLR, the a-priori
// (extrinsic of the other half-iteration) LLR, the parity LLR, the bit's
// memory address and its previous hard decision. It stores these, together
// with the forward metrics alpha, in a window buffer and advances alpha.
// There are two window buffers: while the backward pass walks one window,
// the forward recursion fills the other with the next window. When a window
// is full the controller issues `bwd_go` with the backward metrics beta to
// start from; the unit then walks the window backwards, one
// step per clock, updating beta and producing for every bit the posterior
// LLR  L = max_{u=0}(alpha+gamma+beta) - max_{u=1}(alpha+gamma+beta)  and the
// extrinsic LLR  Le = L - (Ls + La), saturated to EXT_W bits. At the end of
// the window it returns beta at the window's first step (`beta_first`), which
// the controller keeps as the starting beta of the previous window for the
// next iteration (next-iteration initialisation of window boundaries).
// Branch metric: gamma(s,u) = -u*(Ls+La) - p(s,u)*Lp. State metrics are
// normalised every step by subtracting the metric of state 0.
//
// The max-log MAP algorithm, radix-2 and the window length 32 follow the
// design; the windowing scheme, metric widths and normalisation are this
// design's own choices.
//
// Timing: one forward step per cycle with `in_valid`. `bwd_go` closes the
// window: it comes with the window's last forward step or any cycle after
// it, and the next window's steps may follow on the next cycle. The window
// of n steps then produces n outputs on n consecutive cycles (`out_valid`,
// highest index first), and `win_done` comes with the last of them. A new
// `bwd_go` may come as early as the cycle before `win_done` (the last
// backward step of the previous window), so windows of WIN steps stream at
// one step per cycle without idle cycles.
// `blk_start` loads the forward metrics from `alpha_init`: the known
// all-zero start state for the first step of a block, or an estimate for a
// sub-block that starts inside the block. `alpha_out` is the current
// forward metric vector (after the last forward step taken).
module siso_maxlogmap
  import turbo_pkg::*;
#(
  parameter int WIN = 32,
  parameter int AW  = 13,
  localparam int PW = $clog2(WIN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          blk_start,
  input  smvec_t        alpha_init,
  // forward stream
  input  logic          in_valid,
  input  llr_t          in_sys,
  input  ext_t          in_apri,
  input  llr_t          in_par,
  input  logic [AW-1:0] in_addr,
  input  logic          in_old_hd,
  // backward start
  input  logic          bwd_go,
  input  smvec_t        beta_init,
  // output stream
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  output ext_t          out_ext,
  output post_t         out_post,
  output logic          out_hd,
  output logic          out_old_hd,
  output logic          win_done,
  output smvec_t        beta_first,
  output smvec_t        alpha_out,
  output logic          busy
);

  // two window buffers, entry {bank, step}
  sa_t           sa_buf   [2*WIN];
  llr_t          par_buf  [2*WIN];
  logic [AW-1:0] addr_buf [2*WIN];
  logic          hd_buf   [2*WIN];
  sm_t           a_buf    [2*WIN][NSTATE];

  smvec_t        alpha, alpha_nx;
  smvec_t        beta,  beta_nx;
  logic [PW:0]   wptr;
  logic [PW-1:0] bptr;
  logic          fb, bb;               // forward and backward bank
  logic          active;
  sa_t           in_sa;
  logic [PW:0]   wi, bi;               // buffer entries written and read

  assign wi = {fb, wptr[PW-1:0]};
  assign bi = {bb, bptr};

  assign in_sa = sa_t'(in_sys) + sa_t'(in_apri);
  assign busy      = active;
  assign alpha_out = alpha;

  // ---------------- forward recursion ----------------
  always_comb begin
    sm_t  nm [NSTATE];
    sm_t  cand;
    logic [2:0] ns;
    for (int s = 0; s < NSTATE; s++) nm[s] = sm_t'(-(1 <<< (SM_W - 2)));
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        ns   = trellis_next(3'(s), 1'(u));
        cand = alpha[s]
             - (u == 1 ? sm_t'(in_sa) : sm_t'(0))
             - (trellis_par(3'(s), 1'(u)) ? sm_t'(in_par) : sm_t'(0));
        if (cand > nm[ns]) nm[ns] = cand;
      end
    end
    for (int s = 0; s < NSTATE; s++) alpha_nx[s] = nm[s] - nm[0];
  end

  // ---------------- backward recursion and LLRs ----------------
  sa_t   b_sa;
  llr_t  b_par;
  post_t b_m0, b_m1, b_post;

  assign b_sa  = sa_buf[bi];
  assign b_par = par_buf[bi];

  always_comb begin
    sm_t   nb [NSTATE];
    sm_t   g, cand;
    post_t full;
    logic [2:0] ns;
    b_m0 = post_t'(-(1 <<< (POST_W - 2)));
    b_m1 = post_t'(-(1 <<< (POST_W - 2)));
    for (int s = 0; s < NSTATE; s++) nb[s] = sm_t'(-(1 <<< (SM_W - 2)));
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        ns   = trellis_next(3'(s), 1'(u));
        g    = - (u == 1 ? sm_t'(b_sa) : sm_t'(0))
               - (trellis_par(3'(s), 1'(u)) ? sm_t'(b_par) : sm_t'(0));
        cand = g + beta[ns];
        if (cand > nb[s]) nb[s] = cand;
        full = post_t'(a_buf[bi][s]) + post_t'(cand);
        if (u == 0) begin
          if (full > b_m0) b_m0 = full;
        end else begin
          if (full > b_m1) b_m1 = full;
        end
      end
    end
    for (int s = 0; s < NSTATE; s++) beta_nx[s] = nb[s] - nb[0];
    b_post = b_m0 - b_m1;
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATE; s++) begin
        alpha[s]      <= (s == 0) ? sm_t'(0) : SM_UNREACH;
        beta[s]       <= '0;
        beta_first[s] <= '0;
      end
      wptr       <= '0;
      bptr       <= '0;
      fb         <= 1'b0;
      bb         <= 1'b0;
      active     <= 1'b0;
      out_valid  <= 1'b0;
      out_addr   <= '0;
      out_ext    <= '0;
      out_post   <= '0;
      out_hd     <= 1'b0;
      out_old_hd <= 1'b0;
      win_done   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      win_done  <= 1'b0;
      if (blk_start) begin
        alpha  <= alpha_init;
        wptr   <= '0;
        fb     <= 1'b0;
        active <= 1'b0;
      end else begin
        // forward: fill bank fb; bwd_go hands it to the backward pass
        if (in_valid) begin
          sa_buf[wi]   <= in_sa;
          par_buf[wi]  <= in_par;
          addr_buf[wi] <= in_addr;
          hd_buf[wi]   <= in_old_hd;
          for (int s = 0; s < NSTATE; s++) a_buf[wi][s] <= alpha[s];
          alpha <= alpha_nx;
        end
        if (bwd_go) begin
          fb   <= ~fb;
          wptr <= '0;
        end else if (in_valid) begin
          wptr <= wptr + 1'b1;
        end
        // backward: walk bank bb
        if (active) begin
          beta       <= beta_nx;
          out_valid  <= 1'b1;
          out_addr   <= addr_buf[bi];
          out_post   <= b_post;
          out_ext    <= sat_ext(b_post - post_t'(b_sa));
          out_hd     <= b_post[POST_W-1];
          out_old_hd <= hd_buf[bi];
          if (bptr == '0) begin
            active     <= 1'b0;
            win_done   <= 1'b1;
            beta_first <= beta_nx;
          end else begin
            bptr <= bptr - 1'b1;
          end
        end
        // a new window may start as the previous one takes its last step
        if (bwd_go) begin
          beta   <= beta_init;
          bptr   <= in_valid ? wptr[PW-1:0] : PW'(wptr - 1'b1);
          bb     <= fb;
          active <= 1'b1;
        end
      end
    end
  end

  // A window is handed over only when the backward pass is free.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 bwd_go |-> (!active || bptr == '0));
  a_win_bound:  assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> wptr < (PW+1)'(WIN));

endmodule
