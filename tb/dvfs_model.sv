// dvfs_model: behavioural model of the DVFS unit (on-chip buck regulator
// and clock source) for simulation only; not synthesizable logic.
//
// Mode 0 is 1.2 V at 266 MHz, mode 1 is 0.9 V at 160 MHz. When `mode`
// changes, `ready` drops, the clock keeps its old frequency for T_TRANS_PS
// (the supply is moving), then the new voltage and frequency take effect
// and `ready` rises again. Delays are in the simulator's default time unit,
// taken as picoseconds.
module dvfs_model #(
  parameter int T_TRANS_PS = 50_000
) (
  input  logic       mode,
  output logic       clk,
  output logic       ready,
  output int         vdd_mv,
  output int         half_period_ps
);

  logic cur;

  function automatic int hp_of(logic m);
    return m ? 3125 : 1880;          // half periods of 160 MHz and 266 MHz
  endfunction

  initial begin
    cur            = 1'b0;
    clk            = 1'b0;
    ready          = 1'b1;
    vdd_mv         = 1200;
    half_period_ps = hp_of(1'b0);
  end

  always begin
    #(half_period_ps) clk = ~clk;
  end

  always begin
    @(mode);
    while (mode != cur) begin
      ready = 1'b0;
      #(T_TRANS_PS);
      cur            = mode;
      vdd_mv         = cur ? 900 : 1200;
      half_period_ps = hp_of(cur);
      ready          = 1'b1;
    end
  end

endmodule
