// hd_change_counter: convergence metric of the power manager.
//
// After every half-iteration the decoder's posterior LLRs give a fresh hard
// decision for each bit. This block counts how many of those hard decisions
// differ from the ones of the previous half-iteration; that count is the
// convergence metric the control policy watches (it fluctuates for blocks
// that will not decode and falls steadily once a block starts converging).
// The metric itself follows the design; the stream interface is this
// design's choice.
//
// Interface: NL lanes, one per SISO unit. `clear` starts a new
// half-iteration (count <= 0). Every cycle, each lane with `valid` high
// compares `old_hd` (the stored decision of that bit) with `new_hd`; the
// number of differing lanes is added to the count. `count` is registered:
// it includes a compared pair one cycle after its `valid`. The count
// saturates at its maximum.
module hd_change_counter #(
  parameter int K_MAX = 6144,
  parameter int NL    = 6,
  localparam int CW   = $clog2(K_MAX + 1),
  localparam int LW   = $clog2(NL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [NL-1:0] valid,
  input  logic [NL-1:0] old_hd,
  input  logic [NL-1:0] new_hd,
  output logic [CW-1:0] count
);

  logic [LW-1:0] inc;
  logic [CW:0]   sum;

  always_comb begin
    inc = '0;
    for (int l = 0; l < NL; l++)
      inc = inc + LW'(valid[l] && (old_hd[l] != new_hd[l]));
    sum = {1'b0, count} + (CW+1)'(inc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (clear)
      count <= '0;
    else if (sum[CW])
      count <= '1;                       // saturate
    else
      count <= sum[CW-1:0];
  end

endmodule
