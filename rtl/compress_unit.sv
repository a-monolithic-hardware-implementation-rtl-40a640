// compress_unit: Kyber coefficient compression and decompression, two
// coefficients (one polynomial word) at a time, combinational.
//   compress   (decomp = 0): y = round(2^d * x / q) mod 2^d
//   decompress (decomp = 1): y = round(q * x / 2^d), x taken mod 2^d
// for d = 1..11; d = 0 passes the word through unchanged.  Division by q is
// a multiplication by m = ceil(2^35 / q) and a shift by 35, which is exact
// for every numerator below 2^23 (x < q, d <= 11).
// The document only names the Compress/Decompress unit; the formulas are
// Kyber's and the implementation is this design's choice.
module compress_unit
  import kyber_pkg::*;
(
  input  logic       decomp,
  input  logic [3:0] d,
  input  word_t      x,
  output word_t      y
);
  localparam longint unsigned M = ((64'd1 << 35) + 64'(Q) - 64'd1) / 64'(Q);

  function automatic coef_t compress1(input coef_t c, input logic [3:0] dd);
    logic [22:0] num;
    logic [57:0] prod;
    logic [11:0] quo;
    num  = (23'(c) << dd) + 23'(Q / 2);
    prod = 58'(num) * 58'(M);
    quo  = 12'(prod >> 35);
    return quo & coef_t'((12'd1 << dd) - 12'd1);
  endfunction

  function automatic coef_t decompress1(input coef_t c, input logic [3:0] dd);
    logic [23:0] num;
    num = 24'(c & coef_t'((12'd1 << dd) - 12'd1)) * 24'(Q) + ((24'd1 << dd) >> 1);
    return coef_t'(num >> dd);
  endfunction

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      if (d == 4'd0)   y[i*CW +: CW] = x[i*CW +: CW];
      else if (decomp) y[i*CW +: CW] = decompress1(x[i*CW +: CW], d);
      else             y[i*CW +: CW] = compress1(x[i*CW +: CW], d);
    end
  end

endmodule
