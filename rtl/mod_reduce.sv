// mod_reduce: combinational reduction of a product x < 2^24 modulo q = 3329.
// This is the "Reduction" box behind the multiplier of the configurable
// butterfly.  The method is this design's own choice (the butterfly figure
// only names the box): Barrett reduction with k = 24 and m = floor(2^24/q)
// = 5039.  Since 2^24 - m*q = 2385 < q, the quotient estimate
// floor(x*m / 2^24) is at most one below the true quotient for x < 2^24, so
// x - est*q lies in [0, 2q) and one conditional subtraction of q brings it
// into [0, q).
// Interface: x (24-bit) in, r = x mod q (12-bit) out.  No clock; the
// butterfly registers the result.
module mod_reduce
  import kyber_pkg::*;
(
  input  logic [23:0] x,
  output coef_t       r
);
  localparam int unsigned M = (1 << 24) / Q;  // 5039

  logic [36:0] prod;    // x * m
  logic [12:0] est;     // quotient estimate
  logic [25:0] rem;     // x - est*q, < 2q

  always_comb begin
    prod = 37'(x) * 37'(M);
    est  = prod[36:24];
    rem  = 26'(x) - 26'(est) * 26'(Q);
    r    = (rem >= 26'(Q)) ? coef_t'(rem - 26'(Q)) : coef_t'(rem);
  end

endmodule
