// ram_1r1w: simple dual-port memory, one synchronous write port and one
// synchronous read port (read data one cycle after the address). Used for
// the decoder's LLR, extrinsic and hard-decision memories. Reading and
// writing the same address in one cycle returns the old contents.
module ram_1r1w #(
  parameter int DEPTH = 6144,
  parameter int W     = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
