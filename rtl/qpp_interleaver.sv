// qpp_interleaver: address generator for the LTE quadratic permutation
// polynomial interleaver, pi(i) = (f1*i + f2*i^2) mod K.
//
// The turbo decoder sends the systematic and extrinsic messages to the second
// MAP half-iteration in interleaved order; this block produces that order one
// address per step, with no multiplier. It uses the recurrences
//   pi(i+1) = pi(i) + g(i)  mod K,   g(i+1) = g(i) + 2*f2  mod K,
//   pi(0) = 0,  g(0) = (f1 + f2) mod K,
// so each step costs two modular additions. The interleaver type (QPP of LTE)
// follows the LTE code the design targets; the coefficients f1, f2 are
// inputs, taken by the host from the LTE table for the block length K.
//
// Interface: `init` loads K, f1, f2 and sets addr = pi(0) = 0 on the next
// clock. `load` instead restarts the sequence at any index j from a saved
// pair (load_addr = pi(j), load_g = g(j)), which lets a parallel SISO unit
// start at its own sub-block; `g` outputs the current increment so that
// such pairs can be captured while stepping. Every cycle with `step` high
// advances addr to the next index. f1 and f2 must be below K. `addr` is a
// register: pi(i) is valid in the cycle after the i-th step.
module qpp_interleaver #(
  parameter int K_MAX = 6144,
  localparam int AW   = $clog2(K_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          load,
  input  logic          step,
  input  logic [AW-1:0] k_len,
  input  logic [AW-1:0] f1,
  input  logic [AW-1:0] f2,
  input  logic [AW-1:0] load_addr,
  input  logic [AW-1:0] load_g,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] g
);

  logic [AW-1:0] k_q, g_q, inc_q;

  function automatic logic [AW-1:0] add_mod(input logic [AW-1:0] a,
                                            input logic [AW-1:0] b,
                                            input logic [AW-1:0] k);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, k}) s = s - {1'b0, k};
    return s[AW-1:0];
  endfunction

  assign g = g_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q   <= '0;
      g_q   <= '0;
      inc_q <= '0;
      addr  <= '0;
    end else if (init) begin
      k_q   <= k_len;
      g_q   <= add_mod(f1, f2, k_len);
      inc_q <= add_mod(f2, f2, k_len);
      addr  <= '0;
    end else if (load) begin
      k_q   <= k_len;
      inc_q <= add_mod(f2, f2, k_len);
      addr  <= load_addr;
      g_q   <= load_g;
    end else if (step) begin
      addr  <= add_mod(addr, g_q, k_q);
      g_q   <= add_mod(g_q, inc_q, k_q);
    end
  end

endmodule
