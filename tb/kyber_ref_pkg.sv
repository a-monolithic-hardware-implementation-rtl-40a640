// kyber_ref_pkg: behavioural reference models used by the testbenches.
// Written straight from the Kyber / FIPS 202 definitions with plain integer
// arithmetic, independently of the RTL structure:
//   ref_ntt / ref_intt / ref_basemul  - Kyber NTT domain arithmetic
//   ref_schoolbook                    - negacyclic product in Z_q[X]/(X^256+1)
//   ref_keccak_f / ref_shake          - Keccak-f[1600] and SHAKE128/256, round
//                                       constants generated by the LFSR rc(t)
//   ref_cbd / ref_parse               - binomial and uniform sampling
package kyber_ref_pkg;

  localparam int Q = 3329;

  typedef int poly_t [256];
  typedef logic [63:0] state_t [25];
  typedef byte unsigned bytes_t [];

  function automatic int md(input longint x);
    longint r;
    r = x % Q;
    if (r < 0) r += Q;
    return int'(r);
  endfunction

  function automatic int pw17(input int e);
    longint r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * 17) % Q;
    return int'(r);
  endfunction

  function automatic int br7(input int x);
    int r;
    r = 0;
    for (int i = 0; i < 7; i++) if (x & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  function automatic poly_t ref_ntt(input poly_t f);
    int k, j, t, z;
    k = 1;
    for (int len = 128; len >= 2; len /= 2)
      for (int start = 0; start < 256; start += 2 * len) begin
        z = pw17(br7(k));
        k++;
        for (j = start; j < start + len; j++) begin
          t = md(longint'(z) * f[j + len]);
          f[j + len] = md(f[j] - t);
          f[j] = md(f[j] + t);
        end
      end
    return f;
  endfunction

  function automatic poly_t ref_intt(input poly_t f);
    int k, j, t, z;
    k = 127;
    for (int len = 2; len <= 128; len *= 2)
      for (int start = 0; start < 256; start += 2 * len) begin
        z = pw17(br7(k));
        k--;
        for (j = start; j < start + len; j++) begin
          t = f[j];
          f[j] = md(t + f[j + len]);
          f[j + len] = md(longint'(z) * (f[j + len] - t));
        end
      end
    foreach (f[i]) f[i] = md(longint'(f[i]) * 3303);
    return f;
  endfunction

  function automatic poly_t ref_basemul(input poly_t a, input poly_t b);
    poly_t c;
    int g;
    for (int i = 0; i < 128; i++) begin
      g = pw17(2 * br7(i) + 1);
      c[2*i]   = md(longint'(a[2*i]) * b[2*i] + md(longint'(a[2*i+1]) * b[2*i+1]) * longint'(g));
      c[2*i+1] = md(longint'(a[2*i]) * b[2*i+1] + longint'(a[2*i+1]) * b[2*i]);
    end
    return c;
  endfunction

  function automatic poly_t ref_schoolbook(input poly_t a, input poly_t b);
    poly_t c;
    longint acc [256];
    foreach (acc[i]) acc[i] = 0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        if (i + j < 256) acc[i + j] += longint'(a[i]) * b[j];
        else             acc[i + j - 256] -= longint'(a[i]) * b[j];
    foreach (c[i]) c[i] = md(acc[i]);
    return c;
  endfunction

  // ---------------------------------------------------------------- Keccak
  function automatic logic rc_bit(input int t);
    logic [7:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 8'h01;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    end
    return r[0];
  endfunction

  function automatic state_t ref_keccak_f(input state_t a);
    logic [63:0] c [5];
    logic [63:0] d [5];
    state_t b;
    int x, y, t, nx;
    for (int ir = 0; ir < 24; ir++) begin
      for (x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
      for (x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ {c[(x+1)%5][62:0], c[(x+1)%5][63]};
      for (int i = 0; i < 25; i++) a[i] ^= d[i%5];
      // rho: offsets from the (x,y) walk, pi: lane (x,y) moves to (y, 2x+3y)
      begin
        int rofs [25];
        rofs[0] = 0;
        x = 1; y = 0;
        for (t = 0; t < 24; t++) begin
          rofs[x + 5*y] = ((t + 1) * (t + 2) / 2) % 64;
          nx = y;
          y = (2 * x + 3 * y) % 5;
          x = nx;
        end
        for (x = 0; x < 5; x++)
          for (y = 0; y < 5; y++)
            b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], rofs[x + 5*y]);
      end
      for (y = 0; y < 5; y++)
        for (x = 0; x < 5; x++)
          a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
      for (int j = 0; j < 7; j++)
        if (rc_bit(j + 7 * ir)) a[0][(1 << j) - 1] ^= 1'b1;
    end
    return a;
  endfunction

  function automatic logic [63:0] rotl(input logic [63:0] v, input int n);
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  // SHAKE with rate rate_b bytes over msg, nout output bytes
  function automatic bytes_t ref_shake(input int rate_b, input bytes_t msg, input int nout);
    state_t s;
    bytes_t out;
    int p;
    foreach (s[i]) s[i] = '0;
    for (int i = 0; i < msg.size(); i++) s[i/8][8*(i%8) +: 8] ^= msg[i];
    s[msg.size()/8][8*(msg.size()%8) +: 8] ^= 8'h1F;
    s[(rate_b-1)/8][8*((rate_b-1)%8) +: 8] ^= 8'h80;
    s = ref_keccak_f(s);
    out = new[nout];
    p = 0;
    for (int i = 0; i < nout; i++) begin
      if (p == rate_b) begin
        s = ref_keccak_f(s);
        p = 0;
      end
      out[i] = s[p/8][8*(p%8) +: 8];
      p++;
    end
    return out;
  endfunction

  // centered binomial sample of eta, from the bit stream of bytes b
  function automatic int ref_cbd(input bytes_t b, input int eta, input int idx);
    int x, y, base;
    x = 0; y = 0;
    base = 2 * eta * idx;
    for (int j = 0; j < eta; j++) begin
      x += (b[(base + j) / 8] >> ((base + j) % 8)) & 1;
      y += (b[(base + eta + j) / 8] >> ((base + eta + j) % 8)) & 1;
    end
    return md(x - y);
  endfunction

endpackage
