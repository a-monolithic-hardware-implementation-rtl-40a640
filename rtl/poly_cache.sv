// poly_cache: the polynomial cache, on-chip storage for whole polynomials
// (sampled matrix entries, keys, intermediate results) outside the NTT core.
// NPOLY polynomials of 128 two-coefficient words in one simple dual-port RAM,
// addressed by {polynomial, word}: one synchronous write and one synchronous
// read (data one cycle after re) per cycle.
// The document names this block and its share of the area only; its size
// default fills the 10 kB of SRAM reported for Kyber-512 after the 384 bytes
// of the NTT core (25 polynomials of 384 bytes), and the organisation is this
// design's choice.
module poly_cache
  import kyber_pkg::*;
#(
  parameter int unsigned NPOLY = 25,
  localparam int unsigned PW   = (NPOLY > 1) ? $clog2(NPOLY) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [PW-1:0] wpoly,
  input  logic [6:0]    waddr,
  input  word_t         wdata,
  input  logic          re,
  input  logic [PW-1:0] rpoly,
  input  logic [6:0]    raddr,
  output word_t         rdata
);
  localparam int unsigned DEPTH = NPOLY * 128;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [AW-1:0] wa, ra;
  assign wa = AW'(wpoly) * AW'(128) + AW'(waddr);
  assign ra = AW'(rpoly) * AW'(128) + AW'(raddr);

  dp_ram #(.WIDTH(2*CW), .DEPTH(DEPTH)) u_ram (
    .clk   (clk),
    .we    (we),
    .waddr (wa),
    .wdata (wdata),
    .re    (re),
    .raddr (ra),
    .rdata (rdata)
  );

endmodule
