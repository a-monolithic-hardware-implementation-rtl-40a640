// keccak_core: SHAKE128 / SHAKE256 engine for the Kyber samplers.
//
// A serial-in parallel-out (SIPO) buffer collects the message one 64-bit lane
// per cycle; the core then XORs the buffered block and the SHAKE padding
// (0x1F after the message, 0x80 in the last byte of the rate) into the state
// and runs Keccak-f[1600], one round per cycle (24 cycles).  A parallel-in
// serial-out (PISO) buffer takes a whole rate block of output at once and
// shifts it out one byte per cycle; as soon as it is loaded the next
// permutation starts, so the permutation latency is hidden behind the
// consumer while squeezing continues.
//
// The SIPO/PISO arrangement and the latency hiding follow the document; the
// lane-wide input, byte-wide output, one-round-per-cycle permutation and the
// single-block message limit (message shorter than the rate, which covers
// Kyber's XOF and PRF inputs of 34 and 33 bytes) are this design's choices.
//
// Interface: start (with shake256 and msg_len in bytes) clears the state and
// opens absorption; in_valid/in_lane/in_last deliver lanes 0, 1, ... of the
// message (bytes little-endian within a lane).  Output bytes come on
// out_valid/out_ready/out_byte in SHAKE order until stop or a new start.
// First output byte 26 cycles after the last lane.
module keccak_core
  import kyber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        shake256,    // 0: SHAKE128 (rate 168 B), 1: SHAKE256 (136 B)
  input  logic [7:0]  msg_len,     // message length in bytes, below the rate
  input  logic        stop,
  input  logic        in_valid,
  input  logic [63:0] in_lane,
  input  logic        in_last,
  output logic        in_ready,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_byte,
  output logic        busy
);
  localparam int unsigned RATE_LANES = 21;   // SHAKE128 rate, 1344 bits

  typedef logic [63:0] rc_tab_t [24];
  function automatic rc_tab_t gen_rc();
    rc_tab_t t;
    for (int unsigned i = 0; i < 24; i++) t[i] = keccak_rc(i);
    return t;
  endfunction
  localparam rc_tab_t RC = gen_rc();

  typedef enum logic [1:0] {K_IDLE, K_ABSORB, K_SQUEEZE} kphase_e;

  kphase_e                         phase;
  kstate_t                         st;
  kstate_t                         st_next;
  logic [RATE_LANES-1:0][63:0]     sipo;
  logic [4:0]                      lane_cnt;
  logic [RATE_LANES*64-1:0]        piso;
  logic [7:0]                      piso_cnt;    // bytes left in the PISO
  logic                            perm_run;
  logic [4:0]                      round;
  logic                            fresh;       // state holds unread output
  logic                            sha256_q;
  logic [7:0]                      len_q;
  logic [7:0]                      rate_bytes;

  kstate_t absorb_blk;

  keccak_round u_round (
    .s_in  (st),
    .rc    (RC[round]),
    .s_out (st_next)
  );

  assign rate_bytes = sha256_q ? 8'd136 : 8'd168;
  assign in_ready   = (phase == K_ABSORB) && !perm_run;
  assign out_valid  = (piso_cnt != 8'd0);
  assign out_byte   = piso[7:0];
  assign busy       = (phase != K_IDLE);

  // the message block with padding, as lanes of the state
  always_comb begin
    absorb_blk = '0;
    for (int i = 0; i < RATE_LANES; i++) absorb_blk[i] = sipo[i];
    absorb_blk[lane_cnt] = in_lane;
    absorb_blk[len_q[7:3]][8*len_q[2:0] +: 8] ^= 8'h1F;
    absorb_blk[(rate_bytes - 8'd1) >> 3][8*3'(rate_bytes - 8'd1) +: 8] ^= 8'h80;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= K_IDLE;
      st       <= '0;
      sipo     <= '0;
      lane_cnt <= '0;
      piso     <= '0;
      piso_cnt <= '0;
      perm_run <= 1'b0;
      round    <= '0;
      fresh    <= 1'b0;
      sha256_q <= 1'b0;
      len_q    <= '0;
    end else if (start) begin
      phase    <= K_ABSORB;
      st       <= '0;
      sipo     <= '0;
      lane_cnt <= '0;
      piso_cnt <= '0;
      perm_run <= 1'b0;
      round    <= '0;
      fresh    <= 1'b0;
      sha256_q <= shake256;
      len_q    <= msg_len;
    end else if (stop) begin
      phase    <= K_IDLE;
      piso_cnt <= '0;
      perm_run <= 1'b0;
      fresh    <= 1'b0;
    end else begin
      // permutation, one round per cycle
      if (perm_run) begin
        st    <= st_next;
        round <= round + 5'd1;
        if (round == 5'd23) begin
          perm_run <= 1'b0;
          round    <= '0;
          fresh    <= 1'b1;
        end
      end

      unique case (phase)
        K_ABSORB: if (in_valid && !perm_run) begin
          sipo[lane_cnt] <= in_lane;
          lane_cnt       <= lane_cnt + 5'd1;
          if (in_last) begin
            st       <= st ^ absorb_blk;
            perm_run <= 1'b1;
            phase    <= K_SQUEEZE;
          end
        end
        K_SQUEEZE: begin
          if (piso_cnt != 8'd0 && out_ready) begin
            piso     <= piso >> 8;
            piso_cnt <= piso_cnt - 8'd1;
          end
          // reload the PISO with a fresh block and start the next permutation
          if (fresh && (piso_cnt == 8'd0 || (piso_cnt == 8'd1 && out_ready))) begin
            for (int i = 0; i < RATE_LANES; i++) piso[64*i +: 64] <= st[i];
            piso_cnt <= rate_bytes;
            fresh    <= 1'b0;
            perm_run <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
