// kyber_top_checker: runs one operation of a kyber_top built with REJ_ROUNDS
// Keccak blocks for rejection sampling, and checks it against the
// behavioural model.  With enough rounds t must match the schoolbook product;
// with too few accepted candidates the fail flag must be raised.  Results
// are reported on its ports so that one testbench can compare several
// configurations side by side.
module kyber_top_checker
  import kyber_pkg::*;
  import kyber_ref_pkg::*;
#(
  parameter int unsigned ROUNDS = 4,
  parameter int unsigned SEED   = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   fails_seen
);
  logic         start, eta3, busy, done, fail, rd_en, rd_decomp;
  logic [255:0] rho, sigma;
  logic [7:0]   nonce, idx_i, idx_j;
  logic [8:0]   n_rejected;
  logic [6:0]   rd_addr;
  logic [3:0]   rd_d;
  word_t        rd_data;

  kyber_top #(.REJ_ROUNDS(ROUNDS)) dut (.*);

  initial begin
    bytes_t mS, mA, bS, bA;
    poly_t  s, ahat, t_exp, got;
    int     na, nrej, bad;
    finished = 0; checks = 0; failures = 0; cycles = 0; fails_seen = 0;
    start = 0; rd_en = 0; rd_decomp = 0; rd_d = 0; rd_addr = 0;
    eta3 = 1'b0;
    void'($urandom(SEED));
    mS = new[33];
    mA = new[34];
    for (int k = 0; k < 32; k++) begin
      rho[8*k +: 8]   = 8'($urandom);
      sigma[8*k +: 8] = 8'($urandom);
      mA[k] = rho[8*k +: 8];
      mS[k] = sigma[8*k +: 8];
    end
    nonce = 8'(SEED);
    idx_i = 8'd0;
    idx_j = 8'd1;
    mS[32] = nonce;
    mA[32] = idx_j;
    mA[33] = idx_i;
    bS = ref_shake(136, mS, 128);
    foreach (s[i]) s[i] = ref_cbd(bS, 2, i);
    bA = ref_shake(168, mA, int'(ROUNDS) * 168);
    na = 0; nrej = 0;
    for (int i = 0; i < int'(ROUNDS) * 56; i++) begin
      int c1, c2;
      c1 = bA[3*i] + 256 * (bA[3*i+1] % 16);
      c2 = bA[3*i+1] / 16 + 16 * bA[3*i+2];
      if (c1 < Q) begin if (na < 256) ahat[na] = c1; na++; end else nrej++;
      if (c2 < Q) begin if (na < 256) ahat[na] = c2; na++; end else nrej++;
    end
    if (na >= 256) t_exp = ref_schoolbook(ref_intt(ahat), s);

    wait (rst_n);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
    checks++;
    if (fail != (na < 256) || int'(n_rejected) != nrej) begin
      failures++;
      $display("FAIL rounds=%0d: fail=%0d rejected=%0d, expected %0d / %0d",
               ROUNDS, fail, n_rejected, na < 256, nrej);
    end
    if (fail) fails_seen++;
    if (na >= 256) begin
      for (int m = 0; m < 128; m++) begin
        rd_en   <= 1'b1;
        rd_addr <= 7'(m);
        @(posedge clk);
        rd_en <= 1'b0;
        @(negedge clk);
        got[2*m]   = int'(rd_data[11:0]);
        got[2*m+1] = int'(rd_data[23:12]);
        @(posedge clk);
      end
      bad = 0;
      foreach (got[i]) if (got[i] != t_exp[i]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL rounds=%0d: %0d coefficients of t differ", ROUNDS, bad);
      end
    end
    finished = 1;
  end
endmodule
