// kyber_top: polynomial datapath of a monolithic Kyber coprocessor.
//
// One start computes the basic Kyber matrix-vector step for one matrix entry,
// t = INTT( a_hat o NTT(s) ), where
//   s      = CBD_eta( SHAKE256(sigma || nonce) )          (noise polynomial)
//   a_hat  = Parse( SHAKE128(rho || j || i) )              (NTT domain)
// and o is point-wise (base) multiplication in the NTT domain.  The blocks:
// one shared Keccak core (SIPO in, PISO out) feeding the binomial sampler or
// the rejection sampler, the NTT core (two RAM blocks, address generator,
// twiddle ROM, configurable butterflies), the polynomial cache, and a
// compress/decompress unit on the read port.
//
// Sequence (controller FSM):
//   1. SHAKE256 -> cbd_sampler -> s written into the NTT core.
//   2. NTT(s) runs while, in parallel, SHAKE128 -> rej_sampler -> a_hat is
//      written into polynomial 0 of the cache: sampling is hidden behind
//      the NTT.  The rejection sampler consumes a constant 4 Keccak blocks.
//   3. Point-wise multiplication with a_hat streamed from the cache.
//   4. INTT.  done pulses; fail reports a rejection-sampling failure.
// The result is then read word by word (rd_en/rd_addr, data on rd_data one
// cycle later), optionally compressed (rd_decomp = 0, rd_d = bits) or
// decompressed (rd_decomp = 1); rd_d = 0 gives raw coefficients.
//
// The set of blocks, the dataflow of the document's NTT-domain figure and the
// overlap of sampling with arithmetic follow the document.  The full
// KeyGen/Encaps/Decaps sequencing (hashing with SHA3-256/512, encoding,
// error addition, re-encryption check) is not part of this top; this
// controller and its one-entry operation are this design's choice.
module kyber_top
  import kyber_pkg::*;
#(
  parameter int unsigned REJ_ROUNDS = 4,   // Keccak blocks per a_hat
  parameter int unsigned NPOLY      = 25   // polynomials in the cache
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] rho,       // public seed, byte k at bits 8k+7:8k
  input  logic [255:0] sigma,     // noise seed
  input  logic [7:0]   nonce,
  input  logic [7:0]   idx_i,
  input  logic [7:0]   idx_j,
  input  logic         eta3,      // 0: eta = 2, 1: eta = 3
  output logic         busy,
  output logic         done,
  output logic         fail,
  output logic [8:0]   n_rejected, // candidates rejected while sampling a_hat
  input  logic         rd_en,
  input  logic [6:0]   rd_addr,
  input  logic         rd_decomp,
  input  logic [3:0]   rd_d,
  output word_t        rd_data
);
  typedef enum logic [2:0] {
    T_IDLE, T_SAMPLE_S, T_NTT_A, T_PWM, T_INTT, T_DONE
  } tstate_e;

  tstate_e     state;
  logic [2:0]  lane;
  logic [271:0] msg;          // current Keccak message, up to 34 bytes
  logic        ntt_done_q, rej_done_q;
  logic        kc_start;
  logic        restart_xof;   // start SHAKE128 for a_hat, the cycle after s

  // ------------------------------------------------------------- Keccak
  logic        kc_shake256, kc_stop, kc_in_valid, kc_in_last, kc_in_ready;
  logic [7:0]  kc_len;
  logic [63:0] kc_lane;
  logic        kc_out_valid, kc_out_ready, kc_busy;
  logic [7:0]  kc_out_byte;

  keccak_core u_keccak (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (kc_start),
    .shake256  (kc_shake256),
    .msg_len   (kc_len),
    .stop      (kc_stop),
    .in_valid  (kc_in_valid),
    .in_lane   (kc_lane),
    .in_last   (kc_in_last),
    .in_ready  (kc_in_ready),
    .out_valid (kc_out_valid),
    .out_ready (kc_out_ready),
    .out_byte  (kc_out_byte),
    .busy      (kc_busy)
  );

  // ------------------------------------------------------------ samplers
  logic       cbd_start, cbd_in_ready, cbd_out_valid, cbd_done;
  logic [6:0] cbd_addr;
  word_t      cbd_data;
  logic       rej_start, rej_in_ready, rej_out_valid, rej_done, rej_fail;
  logic [6:0] rej_addr;
  word_t      rej_data;
  logic       to_cbd;

  assign to_cbd = (state == T_SAMPLE_S);

  cbd_sampler u_cbd (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (cbd_start),
    .eta3      (eta3),
    .in_valid  (kc_out_valid && to_cbd),
    .in_ready  (cbd_in_ready),
    .in_byte   (kc_out_byte),
    .out_valid (cbd_out_valid),
    .out_addr  (cbd_addr),
    .out_data  (cbd_data),
    .done      (cbd_done)
  );

  rej_sampler #(.ROUNDS(REJ_ROUNDS)) u_rej (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (rej_start),
    .in_valid   (kc_out_valid && !to_cbd),
    .in_ready   (rej_in_ready),
    .in_byte    (kc_out_byte),
    .out_valid  (rej_out_valid),
    .out_addr   (rej_addr),
    .out_data   (rej_data),
    .done       (rej_done),
    .fail       (rej_fail),
    .n_rejected (n_rejected)
  );

  assign kc_out_ready = to_cbd ? cbd_in_ready : rej_in_ready;

  // ---------------------------------------------------- polynomial cache
  logic       pc_re;
  logic [6:0] pc_raddr;
  word_t      pc_rdata;

  poly_cache #(.NPOLY(NPOLY)) u_cache (
    .clk   (clk),
    .we    (rej_out_valid),
    .wpoly ('0),
    .waddr (rej_addr),
    .wdata (rej_data),
    .re    (pc_re),
    .rpoly ('0),
    .raddr (pc_raddr),
    .rdata (pc_rdata)
  );

  // ------------------------------------------------------------ NTT core
  logic       nc_start, nc_busy, nc_done;
  ntt_op_e    nc_op;
  logic       pw_valid, pw_ready;
  word_t      nc_rdata;

  ntt_core u_ntt (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (nc_start),
    .op         (nc_op),
    .busy       (nc_busy),
    .done       (nc_done),
    .pw_b_valid (pw_valid),
    .pw_b_ready (pw_ready),
    .pw_b_data  (pc_rdata),
    .ext_we     (cbd_out_valid),
    .ext_waddr  (cbd_addr),
    .ext_wdata  (cbd_data),
    .ext_re     (rd_en && state == T_IDLE && !nc_busy),
    .ext_raddr  (rd_addr),
    .ext_rdata  (nc_rdata)
  );

  // a_hat stream out of the cache: a read is issued whenever the word
  // register is empty or being consumed; data is valid the cycle after.
  logic       pw_pending;
  logic [7:0] pw_next;
  always_comb begin
    pc_re    = (state == T_PWM) && pw_next != 8'd128 && (!pw_valid || pw_ready)
               && !pw_pending;
    pc_raddr = pw_next[6:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pw_valid   <= 1'b0;
      pw_pending <= 1'b0;
      pw_next    <= '0;
    end else if (state != T_PWM) begin
      pw_valid   <= 1'b0;
      pw_pending <= 1'b0;
      pw_next    <= '0;
    end else begin
      if (pw_valid && pw_ready) pw_valid <= 1'b0;
      if (pc_re) begin
        pw_pending <= 1'b1;
        pw_next    <= pw_next + 8'd1;
      end
      if (pw_pending) begin
        pw_pending <= 1'b0;
        pw_valid   <= 1'b1;
      end
    end
  end

  // -------------------------------------------------------- read port
  logic  rd_decomp_q;
  logic [3:0] rd_d_q;
  always_ff @(posedge clk) begin
    rd_decomp_q <= rd_decomp;
    rd_d_q      <= rd_d;
  end

  compress_unit u_comp (
    .decomp (rd_decomp_q),
    .d      (rd_d_q),
    .x      (nc_rdata),
    .y      (rd_data)
  );

  // ------------------------------------------------------- Keccak feeding
  // SHAKE256 (33-byte PRF input) while s is sampled, SHAKE128 (34 bytes) after
  assign kc_shake256 = (state == T_IDLE) || (state == T_SAMPLE_S);
  assign kc_len      = kc_shake256 ? 8'd33 : 8'd34;

  always_comb begin
    kc_lane     = msg[64*lane +: 64];
    kc_in_valid = kc_busy && kc_in_ready && !kc_start;
    kc_in_last  = (lane == 3'd4);   // 33 and 34 bytes both end in lane 4
  end

  // ------------------------------------------------------------ controller
  assign busy = (state != T_IDLE);

  always_comb begin
    kc_start  = 1'b0;
    cbd_start = 1'b0;
    rej_start = 1'b0;
    nc_start  = 1'b0;
    nc_op     = OP_NTT;
    kc_stop   = 1'b0;
    if (restart_xof) begin
      kc_start  = 1'b1;
      rej_start = 1'b1;
    end
    unique case (state)
      T_IDLE: if (start) begin
        kc_start  = 1'b1;
        cbd_start = 1'b1;
      end
      T_SAMPLE_S: if (cbd_done) begin
        kc_stop  = 1'b1;
        nc_start = 1'b1;
        nc_op    = OP_NTT;
      end
      T_NTT_A: if (ntt_done_q && rej_done_q) begin
        kc_stop  = 1'b1;
        nc_start = 1'b1;
        nc_op    = OP_PWM;
      end
      T_PWM: if (nc_done) begin
        nc_start = 1'b1;
        nc_op    = OP_INTT;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T_IDLE;
      lane        <= '0;
      msg         <= '0;
      ntt_done_q  <= 1'b0;
      rej_done_q  <= 1'b0;
      done        <= 1'b0;
      fail        <= 1'b0;
      restart_xof <= 1'b0;
    end else begin
      done        <= 1'b0;
      restart_xof <= (state == T_SAMPLE_S) && cbd_done;
      if (kc_in_valid) lane <= lane + 3'd1;
      unique case (state)
        T_IDLE: if (start) begin
          msg         <= {8'h00, nonce, sigma};
          lane        <= '0;
          fail        <= 1'b0;
          state       <= T_SAMPLE_S;
        end
        T_SAMPLE_S: if (cbd_done) begin
          state <= T_NTT_A;
        end
        T_NTT_A: begin
          // the Keccak core is restarted for a_hat once s is complete
          if (ntt_done_q && rej_done_q) begin
            state <= T_PWM;
          end
          if (nc_done)  ntt_done_q <= 1'b1;
          if (rej_done) begin
            rej_done_q <= 1'b1;
            fail       <= rej_fail;
          end
        end
        T_PWM: if (nc_done) state <= T_INTT;
        T_INTT: if (nc_done) begin
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
      if (state == T_SAMPLE_S && cbd_done) begin
        msg         <= {idx_i, idx_j, rho};
        lane        <= '0;
        ntt_done_q  <= 1'b0;
        rej_done_q  <= 1'b0;
      end
    end
  end

endmodule
