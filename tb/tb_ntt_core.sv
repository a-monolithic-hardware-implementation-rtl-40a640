// tb_ntt_core: self-checking test of the NTT core.
// Loads a random polynomial f, runs OP_NTT and compares with the reference NTT;
// loads NTT(g) as the point-wise operand stream, runs OP_PWM and compares with
// the reference base multiplication; runs OP_INTT and compares the result with
// the schoolbook negacyclic product f*g.  PWM is repeated with gaps in the
// operand stream.  A further INTT(NTT(h)) = h round trip
// checks INTT alone.  Cycle counts of the three operations are checked against
// bounds of this implementation (NTT <= 490, INTT <= 620, PWM <= 1300 cycles).
module tb_ntt_core;
  import kyber_pkg::*;
  import kyber_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start;
  ntt_op_e    op;
  logic       busy, done;
  logic       pw_b_valid, pw_b_ready;
  word_t      pw_b_data;
  logic       ext_we, ext_re;
  logic [6:0] ext_waddr, ext_raddr;
  word_t      ext_wdata, ext_rdata;

  ntt_core dut (.*);

  int checks = 0, failures = 0;
  int cycles;
  poly_t f, g, h, fh, gh, exp_p, got;
  poly_t bstream;
  int bptr;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input poly_t p);
    for (int m = 0; m < 128; m++) begin
      ext_we    <= 1'b1;
      ext_waddr <= 7'(m);
      ext_wdata <= {coef_t'(p[2*m+1]), coef_t'(p[2*m])};
      @(posedge clk);
    end
    ext_we <= 1'b0;
  endtask

  task automatic unload(output poly_t p);
    for (int m = 0; m < 128; m++) begin
      ext_re    <= 1'b1;
      ext_raddr <= 7'(m);
      @(posedge clk);
      ext_re <= 1'b0;
      @(negedge clk);
      p[2*m]   = int'(ext_rdata[CW-1:0]);
      p[2*m+1] = int'(ext_rdata[2*CW-1:CW]);
      @(posedge clk);
    end
  endtask

  task automatic run(input ntt_op_e o, output int ncyc);
    op    <= o;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    ncyc = 1;
    while (!done) begin
      @(posedge clk);
      ncyc++;
    end
  endtask

  task automatic compare(input string what, input poly_t e, input poly_t gt);
    int bad;
    bad = 0;
    for (int i = 0; i < 256; i++) if (e[i] != gt[i]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d coefficients differ (e.g. [0] exp %0d got %0d)", what, bad, e[0], gt[0]);
    end
  endtask

  task automatic check_cycles(input string what, input int n, input int lim);
    checks++;
    $display("%s: %0d cycles", what, n);
    if (n > lim) begin
      failures++;
      $display("FAIL %s took %0d cycles, bound %0d", what, n, lim);
    end
  endtask

  // B operand stream, with random gaps in valid
  always_ff @(posedge clk) begin
    if (pw_b_valid && pw_b_ready) bptr <= bptr + 1;
  end
  always_comb begin
    pw_b_data = {coef_t'(bstream[2*(bptr%128)+1]), coef_t'(bstream[2*(bptr%128)])};
  end
  bit gappy = 1'b0;
  always_ff @(posedge clk) pw_b_valid <= !gappy || ($urandom_range(0, 3) != 0);

  initial begin
    start = 0; op = OP_NTT; ext_we = 0; ext_re = 0;
    ext_waddr = '0; ext_raddr = '0; ext_wdata = '0;
    bptr = 0;
    foreach (f[i]) begin
      f[i] = $urandom_range(0, Q - 1);
      g[i] = $urandom_range(0, Q - 1);
      h[i] = $urandom_range(0, Q - 1);
    end
    f[0] = Q - 1; f[255] = Q - 1;
    bstream = ref_ntt(g);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // forward NTT
    load(f);
    run(OP_NTT, cycles);
    check_cycles("NTT", cycles, 490);
    unload(got);
    fh = ref_ntt(f);
    compare("NTT", fh, got);

    // point-wise multiplication with NTT(g)
    bptr = 0;
    run(OP_PWM, cycles);
    check_cycles("PWM", cycles, 1300);
    unload(got);
    compare("PWM", ref_basemul(fh, bstream), got);

    // inverse NTT gives the negacyclic product
    run(OP_INTT, cycles);
    check_cycles("INTT", cycles, 620);
    unload(got);
    exp_p = ref_schoolbook(f, g);
    compare("INTT(NTT(f) o NTT(g)) = f*g", exp_p, got);

    // point-wise multiplication again, operand stream with gaps
    load(fh);
    bptr  = 0;
    gappy = 1'b1;
    run(OP_PWM, cycles);
    unload(got);
    compare("PWM, stream with gaps", ref_basemul(fh, bstream), got);

    // round trip
    load(h);
    run(OP_NTT, cycles);
    run(OP_INTT, cycles);
    unload(got);
    compare("INTT(NTT(h)) = h", h, got);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
