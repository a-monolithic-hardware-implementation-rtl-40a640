// keccak_round: one round of Keccak-f[1600] (theta, rho, pi, chi, iota) as
// combinational logic, following FIPS 202.  The round constant is an input so
// that one instance serves all 24 rounds; the rho rotation offsets are
// computed at elaboration time from the (x, y) -> (y, 2x+3y) walk.
// The document names the Keccak-f[1600] permutation but does not describe
// its datapath; one round per cycle is this design's choice.
module keccak_round
  import kyber_pkg::*;
(
  input  kstate_t     s_in,
  input  logic [63:0] rc,
  output kstate_t     s_out
);
  typedef int unsigned ofs_t [25];

  function automatic ofs_t gen_rho();
    ofs_t o;
    int unsigned x, y, nx;
    o[0] = 0;
    x = 1;
    y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      o[x + 5*y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return o;
  endfunction

  localparam ofs_t RHO = gen_rho();

  logic [4:0][63:0] c, d;
  kstate_t a, b;

  always_comb begin
    // theta
    for (int x = 0; x < 5; x++)
      c[x] = s_in[x] ^ s_in[x+5] ^ s_in[x+10] ^ s_in[x+15] ^ s_in[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ {c[(x+1)%5][62:0], c[(x+1)%5][63]};
    for (int i = 0; i < 25; i++) a[i] = s_in[i] ^ d[i%5];
    // rho and pi: lane (x, y) rotated and moved to (y, 2x + 3y)
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = (a[x + 5*y] << RHO[x + 5*y])
                                   | (a[x + 5*y] >> ((64 - RHO[x + 5*y]) % 64));
    // chi and iota
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        s_out[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    s_out[0] = s_out[0] ^ rc;
  end

endmodule
