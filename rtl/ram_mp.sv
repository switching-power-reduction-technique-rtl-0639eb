// ram_mp: memory with NP synchronous write ports and NP synchronous read
// ports (read data one cycle after the address), used for the memories that
// the parallel SISO units access at once. Reading and writing one address in
// the same cycle returns the old contents. Two write ports must not write one
// address in the same cycle; the decoder guarantees this because each bit
// belongs to exactly one SISO unit and the interleaver is a permutation.
// The memory organisation is not taken from the original design: it is this
// design's choice, written as one array with a port per unit. A silicon
// version would split it into single-port banks, which needs an assignment
// of interleaved addresses to banks free of conflicts; that is not done
// here.
module ram_mp #(
  parameter int DEPTH = 6144,
  parameter int W     = 8,
  parameter int NP    = 6,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic [NP-1:0]         we,
  input  logic [NP-1:0][AW-1:0] waddr,
  input  logic [NP-1:0][W-1:0]  wdata,
  input  logic [NP-1:0][AW-1:0] raddr,
  output logic [NP-1:0][W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int q = 0; q < NP; q++) begin
      if (we[q]) mem[waddr[q]] <= wdata[q];
      rdata[q] <= mem[raddr[q]];
    end
  end

endmodule
