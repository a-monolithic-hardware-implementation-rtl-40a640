// ntt_addr_gen: address generator of the NTT core.  For butterfly-pair number
// idx (0..63) of NTT/INTT stage `stage` (0..6) it returns the two word
// addresses to read and write in place, and the twiddle-ROM index.
// A word holds coefficients {2m+1, 2m}; each cycle two butterflies run on the
// even and odd coefficients of words lo = j/2 and hi = (j+len)/2, with j even
// and len the butterfly span.  NTT stages use len = 128, 64, ..., 2 (forward
// Cooley-Tukey order), INTT stages len = 2, 4, ..., 128 (Gentleman-Sande
// order), so neither transform needs a bit-reversal pass.
// The word addresses lo and hi differ in exactly one bit, so they always lie
// in different RAM blocks when the block is chosen by address parity.
// Twiddle index: NTT 2^l + group, INTT 2^(l+1) - 1 - group, where l is the
// layer (len = 128 >> l) and group = butterfly / len.
// Purely combinational.  The document only names this unit; the scheme is
// this design's own.
module ntt_addr_gen (
  input  logic       inverse,
  input  logic [2:0] stage,
  input  logic [5:0] idx,
  output logic [6:0] addr_lo,
  output logic [6:0] addr_hi,
  output logic [6:0] zeta_idx
);
  logic [2:0] layer;
  logic [2:0] span_log;   // log2(len) - 1 = log2 of the span in words
  logic [6:0] t;          // butterfly number of the even butterfly
  logic [6:0] group;
  logic [6:0] off;
  logic [6:0] len;

  always_comb begin
    layer    = inverse ? 3'(3'd6 - stage) : stage;
    span_log = 3'(3'd6 - layer);            // len/2 = 64 >> layer
    len      = 7'(8'd128 >> layer);
    t        = {idx, 1'b0};
    group    = t >> (7 - layer);
    off      = t & 7'(len - 7'd1);
    addr_lo  = 7'((group << (7 - layer)) | (off >> 1));
    addr_hi  = addr_lo | 7'(7'd1 << span_log);
    if (inverse) zeta_idx = 7'((8'd2 << layer) - 8'd1 - 8'(group));
    else         zeta_idx = 7'((8'd1 << layer) + 8'(group));
  end

endmodule
