// tb_kyber_top: end-to-end test of the Kyber polynomial datapath at its
// default parameters.  For random seeds it runs the full operation
// t = INTT(a_hat o NTT(CBD(SHAKE256(sigma||nonce)))) with
// a_hat = Parse(SHAKE128(rho||j||i)), with eta = 2 and eta = 3, and compares
// every coefficient of t with a behavioural model: SHAKE, CBD and parsing
// from the FIPS 202 / Kyber definitions, and the product computed as the
// schoolbook negacyclic product s * INTT(a_hat).  The result is also read
// back compressed (d = 10) and decompressed (d = 4) through the read port.
// Counts the mechanisms of the design and fails if one never happened:
// candidate rejection, Keccak output-block reloads beyond the first,
// sampling overlapped with the NTT, both eta settings, the three NTT-core
// operations, and compressed / decompressed reads.
module tb_kyber_top;
  import kyber_pkg::*;
  import kyber_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, eta3, busy, done, fail, rd_en, rd_decomp;
  logic [255:0] rho, sigma;
  logic [7:0]   nonce, idx_i, idx_j;
  logic [8:0]   n_rejected;
  logic [6:0]   rd_addr;
  logic [3:0]   rd_d;
  word_t        rd_data;

  kyber_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_rej_seen = 0, n_reload = 0, n_overlap = 0, n_eta2 = 0, n_eta3 = 0;
  int n_ntt = 0, n_pwm = 0, n_intt = 0, n_comp = 0, n_decomp = 0;

  always_ff @(posedge clk) begin
    if (dut.u_keccak.fresh && dut.u_keccak.phase == 2'd2 &&
        (dut.u_keccak.piso_cnt == 8'd0 || (dut.u_keccak.piso_cnt == 8'd1 && dut.u_keccak.out_ready)))
      n_reload <= n_reload + 1;
    if (dut.u_ntt.busy && dut.u_rej.run) n_overlap <= n_overlap + 1;
    if (dut.nc_start && dut.nc_op == OP_NTT)  n_ntt  <= n_ntt + 1;
    if (dut.nc_start && dut.nc_op == OP_PWM)  n_pwm  <= n_pwm + 1;
    if (dut.nc_start && dut.nc_op == OP_INTT) n_intt <= n_intt + 1;
  end

  function automatic int compress_ref(input int x, input int d);
    return ((x * (1 << d) * 2 + Q) / (2 * Q)) % (1 << d);
  endfunction
  function automatic int decompress_ref(input int x, input int d);
    return (x * Q * 2 + (1 << d)) / (1 << (d + 1));
  endfunction

  task automatic read_poly(input bit decomp, input int d, output poly_t p);
    for (int m = 0; m < 128; m++) begin
      rd_en     <= 1'b1;
      rd_addr   <= 7'(m);
      rd_decomp <= decomp;
      rd_d      <= 4'(d);
      @(posedge clk);
      rd_en <= 1'b0;
      @(negedge clk);
      p[2*m]   = int'(rd_data[11:0]);
      p[2*m+1] = int'(rd_data[23:12]);
      @(posedge clk);
    end
  endtask

  task automatic one_run(input int eta);
    bytes_t mS, mA, bS, bA;
    poly_t  s, ahat, a, t_exp, got;
    int     na, nrej, bad, cyc;
    mS = new[33];
    mA = new[34];
    for (int k = 0; k < 32; k++) begin
      rho[8*k +: 8]   = 8'($urandom);
      sigma[8*k +: 8] = 8'($urandom);
      mA[k] = rho[8*k +: 8];
      mS[k] = sigma[8*k +: 8];
    end
    nonce = 8'($urandom);
    idx_i = 8'($urandom_range(0, 3));
    idx_j = 8'($urandom_range(0, 3));
    mS[32] = nonce;
    mA[32] = idx_j;
    mA[33] = idx_i;
    eta3   = (eta == 3);

    // reference
    bS = ref_shake(136, mS, 64 * eta);
    foreach (s[i]) s[i] = ref_cbd(bS, eta, i);
    bA = ref_shake(168, mA, 672);
    na = 0; nrej = 0;
    for (int i = 0; i < 224; i++) begin
      int c1, c2;
      c1 = bA[3*i] + 256 * (bA[3*i+1] % 16);
      c2 = bA[3*i+1] / 16 + 16 * bA[3*i+2];
      if (c1 < Q) begin if (na < 256) ahat[na] = c1; na++; end else nrej++;
      if (c2 < Q) begin if (na < 256) ahat[na] = c2; na++; end else nrej++;
    end
    a     = ref_intt(ahat);
    t_exp = ref_schoolbook(a, s);

    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    $display("eta=%0d: %0d cycles, %0d rejected", eta, cyc, n_rejected);
    if (eta == 2) n_eta2++; else n_eta3++;
    if (n_rejected != 0) n_rej_seen++;

    checks++;
    if (fail != (na < 256) || int'(n_rejected) != nrej) begin
      failures++;
      $display("FAIL status: fail=%0d rejected=%0d, expected %0d / %0d", fail, n_rejected, na < 256, nrej);
    end

    read_poly(1'b0, 0, got);
    bad = 0;
    foreach (got[i]) if (got[i] != t_exp[i]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL t: %0d coefficients differ ([0] exp %0d got %0d)", bad, t_exp[0], got[0]);
    end

    read_poly(1'b0, 10, got);
    n_comp++;
    bad = 0;
    foreach (got[i]) if (got[i] != compress_ref(t_exp[i], 10)) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL compressed read: %0d differ", bad);
    end

    read_poly(1'b1, 4, got);
    n_decomp++;
    bad = 0;
    foreach (got[i]) if (got[i] != decompress_ref(t_exp[i] % 16, 4)) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL decompressed read: %0d differ", bad);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    start = 0; eta3 = 0; rd_en = 0; rd_decomp = 0; rd_d = 0; rd_addr = 0;
    rho = '0; sigma = '0; nonce = 0; idx_i = 0; idx_j = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    one_run(2);
    one_run(3);
    one_run(2);
    need("rejected candidates", n_rej_seen);
    need("Keccak block reloads", n_reload);
    need("sampling during NTT (cycles)", n_overlap);
    need("eta = 2 runs", n_eta2);
    need("eta = 3 runs", n_eta3);
    need("NTT operations", n_ntt);
    need("point-wise operations", n_pwm);
    need("INTT operations", n_intt);
    need("compressed reads", n_comp);
    need("decompressed reads", n_decomp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
