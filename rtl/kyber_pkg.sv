// kyber_pkg: constants, types and small helper functions shared by the Kyber
// polynomial datapath.  Kyber works over Z_q[X]/(X^256+1) with q = 3329; a
// coefficient is kept as a 12-bit value in [0, q).  A RAM word of the NTT core
// holds two neighbouring coefficients (the "doubled bandwidth" word), and the
// NTT twiddles are powers of the 256th root of unity 17.  The helpers below
// are pure functions, used for ROM contents and address arithmetic.
package kyber_pkg;

  localparam int unsigned N     = 256;   // coefficients per polynomial
  localparam int unsigned Q     = 3329;  // Kyber modulus
  localparam int unsigned CW    = 12;    // coefficient width
  localparam int unsigned ZETA  = 17;    // primitive 256th root of unity mod q
  localparam int unsigned NINV  = 3303;  // 128^-1 mod q, INTT scaling factor

  typedef logic [CW-1:0]   coef_t;
  typedef logic [2*CW-1:0] word_t;       // {odd coefficient, even coefficient}

  // Operation codes of the configurable butterfly (numbering as in its figure)
  typedef enum logic [1:0] {
    BF_CT  = 2'd0,  // NTT, Cooley-Tukey: a = u + w*v, b = u - w*v
    BF_GS  = 2'd1,  // INTT, Gentleman-Sande: a = u + v, b = (u - v)*w
    BF_PWM = 2'd2   // point-wise: b = v*w, a = u + v*w
  } bf_mode_e;

  // Operations of the NTT core
  typedef enum logic [1:0] {
    OP_NTT  = 2'd0,
    OP_INTT = 2'd1,
    OP_PWM  = 2'd2
  } ntt_op_e;

  function automatic logic [6:0] bitrev7(input logic [6:0] x);
    for (int i = 0; i < 7; i++) bitrev7[i] = x[6-i];
  endfunction

  // 17^e mod q, square-and-multiply
  function automatic coef_t pow_zeta(input int unsigned e);
    int unsigned r, b;
    r = 1;
    b = ZETA;
    for (int i = 0; i < 9; i++) begin
      if (e[i]) r = (r * b) % Q;
      b = (b * b) % Q;
    end
    return coef_t'(r);
  endfunction

  // Modular addition and subtraction of two values in [0, q)
  function automatic coef_t mod_add(input coef_t a, input coef_t b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= (CW+1)'(Q)) ? coef_t'(s - (CW+1)'(Q)) : coef_t'(s);
  endfunction

  function automatic coef_t mod_sub(input coef_t a, input coef_t b);
    logic [CW:0] s;
    s = {1'b0, a} - {1'b0, b};
    return s[CW] ? coef_t'(s + (CW+1)'(Q)) : coef_t'(s);
  endfunction

  // Keccak-f[1600] state, lane x + 5*y at index x + 5*y (FIPS 202 order)
  typedef logic [24:0][63:0] kstate_t;

  // Keccak round constant of round ir, from the LFSR x^8+x^6+x^5+x^4+1
  function automatic logic [63:0] keccak_rc(input int unsigned ir);
    logic [7:0]  r;
    logic [63:0] rc;
    rc = '0;
    for (int j = 0; j < 7; j++) begin
      r = 8'h01;
      for (int unsigned i = 0; i < (j + 7 * ir) % 255; i++)
        r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
      rc[(1 << j) - 1] = r[0];
    end
    return rc;
  endfunction

  // Even parity of a word address: selects one of the two RAM blocks
  function automatic logic bank_of(input logic [6:0] addr);
    return ^addr;
  endfunction

endpackage
