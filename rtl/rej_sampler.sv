// rej_sampler: uniform rejection sampler producing a polynomial of the Kyber
// matrix A directly in the NTT domain.
// Every 3 bytes of the SHAKE128 stream give two 12-bit candidates
// d1 = b0 + 256*(b1 mod 16) and d2 = floor(b1/16) + 16*b2; a candidate below
// q = 3329 is accepted, the others are rejected.  Both candidates of a triple
// are checked in the same cycle.
// Constant time: as the document proposes, the sampler always consumes a
// fixed number of Keccak output blocks (ROUNDS blocks of 168 bytes: 4 blocks
// = 448 candidates for 256 needed, failure probability 2.2e-32 per the
// document's table) whatever the number of rejections, and keeps the first
// 256 accepted values.  If fewer than 256 were accepted it raises fail.
// Accepted coefficients are packed two per word and written out as words
// 0..127 on out_valid/out_addr/out_data.  done pulses one cycle after the last
// byte.  Packing and the byte-wide input are this design's choices.
module rej_sampler
  import kyber_pkg::*;
#(
  parameter int unsigned ROUNDS = 4     // Keccak output blocks consumed
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic [6:0] out_addr,
  output word_t      out_data,
  output logic       done,
  output logic       fail,
  output logic [8:0] n_rejected
);
  localparam int unsigned TOTAL_BYTES = ROUNDS * 168;
  localparam int unsigned BW = $clog2(TOTAL_BYTES + 1);

  logic          run;
  logic [BW-1:0] nbytes;
  logic [1:0]    bsel;
  logic [7:0]    b0, b1;
  logic [8:0]    n_acc;
  coef_t         pend;
  logic          pend_v;

  coef_t d1, d2;
  logic  acc1, acc2;
  logic  take, triple;
  logic  [8:0] room;

  always_comb begin
    in_ready = run;
    take     = in_valid && run;
    triple   = take && (bsel == 2'd2);
    d1       = {b1[3:0], b0};
    d2       = {in_byte, b1[7:4]};
    room     = 9'(256) - n_acc;
    acc1     = triple && (d1 < coef_t'(Q)) && (room != 9'd0);
    acc2     = triple && (d2 < coef_t'(Q)) && (room > 9'(acc1));
  end

  // packing of accepted values into words
  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    out_addr  = n_acc[7:1];
    if (acc1 && acc2) begin
      out_valid = 1'b1;
      out_data  = pend_v ? {d1, pend} : {d2, d1};
    end else if (acc1 || acc2) begin
      out_valid = pend_v;
      out_data  = {acc1 ? d1 : d2, pend};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= 1'b0;
      nbytes     <= '0;
      bsel       <= '0;
      b0         <= '0;
      b1         <= '0;
      n_acc      <= '0;
      pend       <= '0;
      pend_v     <= 1'b0;
      done       <= 1'b0;
      fail       <= 1'b0;
      n_rejected <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run        <= 1'b1;
        nbytes     <= '0;
        bsel       <= '0;
        n_acc      <= '0;
        pend_v     <= 1'b0;
        fail       <= 1'b0;
        n_rejected <= '0;
      end else if (take) begin
        nbytes <= nbytes + 1'b1;
        bsel   <= (bsel == 2'd2) ? 2'd0 : bsel + 2'd1;
        if (bsel == 2'd0) b0 <= in_byte;
        if (bsel == 2'd1) b1 <= in_byte;
        if (triple) begin
          n_acc      <= n_acc + 9'(acc1) + 9'(acc2);
          n_rejected <= n_rejected + 9'(d1 >= coef_t'(Q)) + 9'(d2 >= coef_t'(Q));
          if (acc1 && acc2) begin
            pend <= d2;           // only used when a value was pending
          end else if (acc1 || acc2) begin
            pend   <= acc1 ? d1 : d2;
            pend_v <= !pend_v;
          end
        end
        if (nbytes == BW'(TOTAL_BYTES - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
          fail <= ((n_acc + 9'(acc1) + 9'(acc2)) != 9'd256);
        end
      end
    end
  end

endmodule
