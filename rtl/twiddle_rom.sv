// twiddle_rom: the pre-computed twiddle-factor ROM of the NTT core.
// Two tables of 128 entries, both read synchronously (one cycle latency):
//   zeta[k]  = 17^bitrev7(k) mod q       twiddles of the NTT/INTT layers
//   gamma[i] = 17^(2*bitrev7(i)+1) mod q moduli X^2 - gamma of the 128
//                                        degree-1 base multiplications
// The contents are computed at elaboration time from these formulas rather
// than stored as a list of numbers.  The ROM itself is named by the document;
// the second table and the synchronous read are this design's choices.
module twiddle_rom
  import kyber_pkg::*;
(
  input  logic       clk,
  input  logic [6:0] zeta_idx,
  input  logic [6:0] gamma_idx,
  output coef_t      zeta,
  output coef_t      gamma
);
  typedef coef_t table_t [128];

  function automatic table_t gen_zetas();
    table_t t;
    for (int k = 0; k < 128; k++) t[k] = pow_zeta(int'(bitrev7(7'(k))));
    return t;
  endfunction

  function automatic table_t gen_gammas();
    table_t t;
    for (int i = 0; i < 128; i++) t[i] = pow_zeta(2 * int'(bitrev7(7'(i))) + 1);
    return t;
  endfunction

  localparam table_t ZETAS  = gen_zetas();
  localparam table_t GAMMAS = gen_gammas();

  always_ff @(posedge clk) begin
    zeta  <= ZETAS[zeta_idx];
    gamma <= GAMMAS[gamma_idx];
  end

endmodule
