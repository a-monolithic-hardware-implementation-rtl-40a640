// ntt_core: NTT / INTT / point-wise multiplication core for one Kyber
// polynomial (256 coefficients mod q = 3329).
//
// Structure (as the document lists it): two RAM blocks, an address generator,
// a pre-computed twiddle ROM and an arithmetic unit made of configurable
// butterflies.  Each RAM word holds two coefficients ("doubled bandwidth"),
// word m = {c[2m+1], c[2m]}.  Word m lives in RAM block parity(m) at index
// m[6:1]; the two words a butterfly pair touches always differ in one address
// bit and so sit in different blocks, which lets the core read two words and
// write two words every cycle from two simple dual-port RAMs.
//
// Operations (op at start):
//   OP_NTT  : forward NTT in place, 7 Cooley-Tukey layers (len 128 .. 2),
//             output in Kyber's bit-reversed NTT order.  Two butterflies per
//             cycle: 64 cycles per layer plus a 4-cycle pipeline drain.
//   OP_INTT : inverse NTT in place, 7 Gentleman-Sande layers (len 2 .. 128)
//             with twiddles -zeta, then one pass multiplying every
//             coefficient by 128^-1 mod q (one word per cycle, 128 cycles).
//   OP_PWM  : point-wise (base) multiplication of the stored polynomial by a
//             second NTT-domain polynomial streamed in on pw_b_* (word m in
//             order m = 0..127): c0 = a0*b0 + a1*b1*gamma_m, c1 = a0*b1 + a1*b0,
//             computed as three dependent multiply-accumulate steps on the two
//             butterflies, about 10 cycles per word.
// Doing NTT with CT and INTT with GS avoids any bit-reversal pass, as the
// document describes.  The two-butterfly arithmetic unit, parity banking,
// drain between layers and the base-multiplication schedule are this design's
// own choices; the resulting cycle counts are roughly 480 (NTT), 610 (INTT)
// and 1280 (PWM).
//
// Interface: start/op begin an operation when idle; busy is high until the
// one-cycle done pulse.  While idle the ext_* port loads and reads words
// (read data one cycle after ext_re).
module ntt_core
  import kyber_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  ntt_op_e    op,
  output logic       busy,
  output logic       done,
  // B operand stream for OP_PWM
  input  logic       pw_b_valid,
  output logic       pw_b_ready,
  input  word_t      pw_b_data,
  // load / unload port, used while idle
  input  logic       ext_we,
  input  logic [6:0] ext_waddr,
  input  word_t      ext_wdata,
  input  logic       ext_re,
  input  logic [6:0] ext_raddr,
  output word_t      ext_rdata
);
  localparam int unsigned LAT = 4;  // RAM read (1) + butterfly (3)

  typedef enum logic [3:0] {
    S_IDLE, S_LAYER, S_DRAIN, S_SCALE, S_SDRAIN,
    S_PW_RD, S_PW_S1, S_PW_S2, S_PW_S3, S_PW_WR, S_DONE
  } state_e;

  // what travels down the pipeline alongside the butterflies
  typedef struct packed {
    logic       valid;
    logic       pair;   // 1: two words (layer), 0: one word (scaling)
    logic [6:0] lo;
    logic [6:0] hi;
  } wb_t;

  state_e     state;
  ntt_op_e    op_q;
  logic [2:0] stage;
  logic [6:0] cnt;      // pair index in a layer / word index otherwise
  logic [2:0] drain;

  // ---------------------------------------------------------------- RAMs
  logic       ram_we [2];
  logic [5:0] ram_wa [2];
  word_t      ram_wd [2];
  logic       ram_re [2];
  logic [5:0] ram_ra [2];
  word_t      ram_rd [2];

  for (genvar g = 0; g < 2; g++) begin : g_ram
    dp_ram #(.WIDTH(2*CW), .DEPTH(64)) u_ram (
      .clk   (clk),
      .we    (ram_we[g]),
      .waddr (ram_wa[g]),
      .wdata (ram_wd[g]),
      .re    (ram_re[g]),
      .raddr (ram_ra[g]),
      .rdata (ram_rd[g])
    );
  end

  // ---------------------------------------------------- address generator
  logic [6:0] ag_lo, ag_hi, ag_zidx;
  ntt_addr_gen u_ag (
    .inverse  (op_q == OP_INTT),
    .stage    (stage),
    .idx      (cnt[5:0]),
    .addr_lo  (ag_lo),
    .addr_hi  (ag_hi),
    .zeta_idx (ag_zidx)
  );

  // ----------------------------------------------------------- twiddle ROM
  coef_t rom_zeta, rom_gamma;
  logic [6:0] gamma_idx;   // word whose A operand is read this cycle
  assign gamma_idx = (state == S_PW_WR) ? 7'(cnt + 7'd1) : cnt;
  twiddle_rom u_rom (
    .clk       (clk),
    .zeta_idx  (ag_zidx),
    .gamma_idx (gamma_idx),
    .zeta      (rom_zeta),
    .gamma     (rom_gamma)
  );

  // ------------------------------------------------------------ butterflies
  logic     bf_in_valid;
  bf_mode_e bf_mode;
  coef_t    bf_u [2], bf_v [2], bf_w [2];
  logic     bf_out_valid [2];
  coef_t    bf_a [2], bf_b [2];

  for (genvar g = 0; g < 2; g++) begin : g_bf
    butterfly u_bf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (bf_in_valid),
      .mode      (bf_mode),
      .u         (bf_u[g]),
      .v         (bf_v[g]),
      .w         (bf_w[g]),
      .out_valid (bf_out_valid[g]),
      .a         (bf_a[g]),
      .b         (bf_b[g])
    );
  end

  // ------------------------------------------------------ read-side control
  logic  rd_issue_pair;   // a layer read this cycle
  logic  rd_issue_one;    // a scaling read this cycle
  logic  rd_swap;         // lo word is in block 1
  wb_t   rd_info;         // info of the read issued this cycle
  wb_t   pipe [LAT];      // pipe[0]: data of the read issued last cycle
  logic  pipe_swap;       // swap of the read issued last cycle
  word_t rd_lo, rd_hi;    // words of the read issued last cycle

  // point-wise multiplication operand registers
  word_t pw_a, pw_b;
  coef_t pw_g, pw_c1;

  always_comb begin
    rd_issue_pair = (state == S_LAYER);
    rd_issue_one  = (state == S_SCALE);
    rd_swap       = rd_issue_pair ? bank_of(ag_lo) : bank_of(cnt);
    rd_info.valid = rd_issue_pair | rd_issue_one;
    rd_info.pair  = rd_issue_pair;
    rd_info.lo    = rd_issue_pair ? ag_lo : cnt;
    rd_info.hi    = ag_hi;
  end

  // read data of last cycle's read, lo/hi restored from the block order
  assign rd_lo = pipe_swap ? ram_rd[1] : ram_rd[0];
  assign rd_hi = pipe_swap ? ram_rd[0] : ram_rd[1];

  // write-back info of the butterfly results leaving the pipeline now
  wb_t wb;
  assign wb = pipe[LAT-1];

  always_comb begin
    for (int g = 0; g < 2; g++) begin
      ram_re[g] = 1'b0;
      ram_ra[g] = '0;
      ram_we[g] = 1'b0;
      ram_wa[g] = '0;
      ram_wd[g] = '0;
    end
    bf_in_valid = 1'b0;
    bf_mode     = BF_CT;
    for (int g = 0; g < 2; g++) begin
      bf_u[g] = '0;
      bf_v[g] = '0;
      bf_w[g] = '0;
    end
    pw_b_ready = 1'b0;

    // reads
    unique case (state)
      S_IDLE: begin
        ram_re[bank_of(ext_raddr)] = ext_re;
        ram_ra[bank_of(ext_raddr)] = ext_raddr[6:1];
      end
      S_LAYER: begin
        ram_re[0] = 1'b1;
        ram_re[1] = 1'b1;
        ram_ra[rd_swap]  = ag_lo[6:1];
        ram_ra[!rd_swap] = ag_hi[6:1];
      end
      S_SCALE, S_PW_RD: begin
        ram_re[rd_swap] = 1'b1;
        ram_ra[rd_swap] = cnt[6:1];
      end
      S_PW_WR: if (bf_out_valid[0] && cnt != 7'd127) begin
        ram_re[bank_of(7'(cnt + 7'd1))] = 1'b1;
        ram_ra[bank_of(7'(cnt + 7'd1))] = 6'((cnt + 7'd1) >> 1);
      end
      default: ;
    endcase

    // butterfly issue for layers and scaling (one cycle after the read)
    if (pipe[0].valid) begin
      bf_in_valid = 1'b1;
      if (pipe[0].pair) begin
        bf_mode = (op_q == OP_INTT) ? BF_GS : BF_CT;
        for (int g = 0; g < 2; g++) begin
          bf_u[g] = rd_lo[g*CW +: CW];
          bf_v[g] = rd_hi[g*CW +: CW];
          bf_w[g] = (op_q == OP_INTT) ? mod_sub('0, rom_zeta) : rom_zeta;
        end
      end else begin
        bf_mode = BF_PWM;
        for (int g = 0; g < 2; g++) begin
          bf_v[g] = rd_lo[g*CW +: CW];
          bf_w[g] = coef_t'(NINV);
        end
      end
    end

    // point-wise multiplication schedule (operands a0,a1 / b0,b1 per word)
    unique case (state)
      S_PW_RD, S_PW_WR: pw_b_ready = (state == S_PW_RD) || (bf_out_valid[0] && cnt != 7'd127);
      S_PW_S1: begin     // t1 = a1*b1, t2 = a0*b1
        bf_in_valid = 1'b1;
        bf_mode     = BF_PWM;
        bf_v[0] = rd_lo[CW +: CW]; bf_w[0] = pw_b[CW +: CW];
        bf_v[1] = rd_lo[0  +: CW]; bf_w[1] = pw_b[CW +: CW];
      end
      S_PW_S2: if (bf_out_valid[0]) begin  // t3 = t1*gamma, c1 = t2 + a1*b0
        bf_in_valid = 1'b1;
        bf_mode     = BF_PWM;
        bf_v[0] = bf_b[0];        bf_w[0] = pw_g;
        bf_u[1] = bf_b[1];
        bf_v[1] = pw_a[CW +: CW]; bf_w[1] = pw_b[0 +: CW];
      end
      S_PW_S3: if (bf_out_valid[0]) begin  // c0 = t3 + a0*b0
        bf_in_valid = 1'b1;
        bf_mode     = BF_PWM;
        bf_u[0] = bf_b[0];
        bf_v[0] = pw_a[0 +: CW];  bf_w[0] = pw_b[0 +: CW];
      end
      default: ;
    endcase

    // writes
    if (state == S_IDLE) begin
      ram_we[bank_of(ext_waddr)] = ext_we;
      ram_wa[bank_of(ext_waddr)] = ext_waddr[6:1];
      ram_wd[bank_of(ext_waddr)] = ext_wdata;
    end else if (wb.valid && bf_out_valid[0]) begin
      if (wb.pair) begin
        ram_we[0] = 1'b1;
        ram_we[1] = 1'b1;
        ram_wa[bank_of(wb.lo)]  = wb.lo[6:1];
        ram_wd[bank_of(wb.lo)]  = {bf_a[1], bf_a[0]};
        ram_wa[!bank_of(wb.lo)] = wb.hi[6:1];
        ram_wd[!bank_of(wb.lo)] = {bf_b[1], bf_b[0]};
      end else begin
        ram_we[bank_of(wb.lo)] = 1'b1;
        ram_wa[bank_of(wb.lo)] = wb.lo[6:1];
        ram_wd[bank_of(wb.lo)] = {bf_b[1], bf_b[0]};
      end
    end else if (state == S_PW_WR && bf_out_valid[0]) begin
      ram_we[bank_of(cnt)] = 1'b1;
      ram_wa[bank_of(cnt)] = cnt[6:1];
      ram_wd[bank_of(cnt)] = {pw_c1, bf_a[0]};
    end
  end

  assign ext_rdata = pipe_swap ? ram_rd[1] : ram_rd[0];

  // ---------------------------------------------------------- pipeline regs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
      pipe_swap <= 1'b0;
    end else begin
      pipe[0] <= rd_info;
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
      unique case (state)
        S_IDLE:  pipe_swap <= bank_of(ext_raddr);
        S_LAYER, S_SCALE, S_PW_RD: pipe_swap <= rd_swap;
        S_PW_WR: pipe_swap <= bank_of(7'(cnt + 7'd1));
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ controller
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= OP_NTT;
      stage <= '0;
      cnt   <= '0;
      drain <= '0;
      done  <= 1'b0;
      pw_a  <= '0;
      pw_b  <= '0;
      pw_g  <= '0;
      pw_c1 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          stage <= '0;
          cnt   <= '0;
          state <= (op == OP_PWM) ? S_PW_RD : S_LAYER;
        end
        S_LAYER: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd63) begin
            cnt   <= '0;
            drain <= 3'(LAT);
            state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain <= drain - 3'd1;
          if (drain == 3'd1) begin
            if (stage != 3'd6) begin
              stage <= stage + 3'd1;
              state <= S_LAYER;
            end else if (op_q == OP_INTT) begin
              state <= S_SCALE;
            end else begin
              state <= S_DONE;
            end
          end
        end
        S_SCALE: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd127) begin
            drain <= 3'(LAT);
            state <= S_SDRAIN;
          end
        end
        S_SDRAIN: begin
          drain <= drain - 3'd1;
          if (drain == 3'd1) state <= S_DONE;
        end
        S_PW_RD: if (pw_b_valid) begin
          pw_b  <= pw_b_data;
          state <= S_PW_S1;
        end
        S_PW_S1: begin
          pw_a  <= rd_lo;
          pw_g  <= rom_gamma;
          state <= S_PW_S2;
        end
        S_PW_S2: if (bf_out_valid[0]) state <= S_PW_S3;
        S_PW_S3: if (bf_out_valid[0]) begin
          pw_c1 <= bf_a[1];
          state <= S_PW_WR;
        end
        S_PW_WR: if (bf_out_valid[0]) begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'd127) state <= S_DONE;
          else if (pw_b_valid) begin
            pw_b  <= pw_b_data;
            state <= S_PW_S1;
          end else begin
            state <= S_PW_RD;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
