// cbd_sampler: configurable centered-binomial sampler for Kyber's noise
// polynomials, eta = 2 or eta = 3, two samples per cycle.
// Each sample is (sum of eta bits) - (sum of the next eta bits), taken in
// order from the Keccak byte stream, so a pair of samples uses 8 bits
// (eta = 2) or 12 bits (eta = 3).  As in the document's figure, one set of
// adders and subtractors serves both values of eta: a select signal
// (eta3 = 0 for eta = 2, 1 for eta = 3) routes the extra third bit of each
// sum into the adders.  The result is reduced into [0, q) (x - y + q when
// negative) and two samples are packed into one polynomial word.
// Bytes arrive on in_valid/in_ready/in_byte into a small bit buffer; the
// sampler emits word 0, 1, ..., 127 on out_valid/out_addr/out_data (one word
// per cycle whenever 8 or 12 bits are buffered) and pulses done after the
// last word.  The bit buffer and the word packing are this design's choice.
module cbd_sampler
  import kyber_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       eta3,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic [6:0] out_addr,
  output word_t      out_data,
  output logic       done
);
  logic        run;
  logic        eta3_q;
  logic [23:0] bits;      // bit buffer, oldest bit at position 0
  logic [4:0]  nbits;
  logic [7:0]  nwords;    // words emitted so far
  logic [4:0]  need;
  logic        fire;
  logic        take;
  logic [4:0]  after_use;

  // shared adder tree
  logic [1:0] x0, y0, x1, y1;
  logic [1:0] p01, p45, p67;
  coef_t      s0, s1;

  function automatic coef_t cbd_mod(input logic [1:0] x, input logic [1:0] y);
    return (x >= y) ? coef_t'(2'(x - y)) : coef_t'(Q - 32'(2'(y - x)));
  endfunction

  always_comb begin
    need = eta3_q ? 5'd12 : 5'd8;
    // pairs of bits common to both configurations
    p01 = 2'(bits[0]) + 2'(bits[1]);
    p45 = 2'(bits[4]) + 2'(bits[5]);
    p67 = 2'(bits[6]) + 2'(bits[7]);
    if (!eta3_q) begin
      x0 = p01;
      y0 = 2'(bits[2]) + 2'(bits[3]);
      x1 = p45;
      y1 = p67;
    end else begin
      x0 = p01 + 2'(bits[2]);
      y0 = p45 + 2'(bits[3]);
      x1 = p67 + 2'(bits[8]);
      y1 = 2'(bits[9]) + 2'(bits[10]) + 2'(bits[11]);
    end
    s0 = cbd_mod(x0, y0);
    s1 = cbd_mod(x1, y1);

    fire      = run && (nbits >= need);
    after_use = fire ? 5'(nbits - need) : nbits;
    in_ready  = run && (after_use <= 5'd16);
    take      = in_valid && in_ready;
  end

  assign out_valid = fire;
  assign out_addr  = nwords[6:0];
  assign out_data  = {s1, s0};

  logic [23:0] shifted;
  assign shifted = fire ? (bits >> need) : bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      eta3_q <= 1'b0;
      bits   <= '0;
      nbits  <= '0;
      nwords <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run    <= 1'b1;
        eta3_q <= eta3;
        bits   <= '0;
        nbits  <= '0;
        nwords <= '0;
      end else begin
        bits  <= take ? (shifted | (24'(in_byte) << after_use)) : shifted;
        nbits <= after_use + (take ? 5'd8 : 5'd0);
        if (fire) begin
          nwords <= nwords + 8'd1;
          if (nwords == 8'd127) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
