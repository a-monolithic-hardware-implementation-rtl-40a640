// tb_rej_sampler: self-checking test of the rejection sampler.
// Random 672-byte streams (4 SHAKE128 blocks) are sampled, with and without
// gaps in valid; the words are compared with a reference parse of the same
// bytes (candidates below q kept in order).  Checks the constant-time rule:
// done always comes after exactly 672 bytes, however many candidates were
// rejected.  A stream biased towards rejection (mostly 0xFF bytes) must
// raise fail; the reported rejection count is checked too.
module tb_rej_sampler;
  import kyber_pkg::*;
  import kyber_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, in_valid, in_ready, out_valid, done, fail;
  logic [7:0] in_byte;
  logic [6:0] out_addr;
  word_t      out_data;
  logic [8:0] n_rejected;

  rej_sampler dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t stream;
  int     sptr;
  bit     gappy;
  int     got [256];
  int     expv [256];
  int     nexp, nrej, nbytes_used;

  always_comb in_byte = stream[sptr % stream.size()];
  always_ff @(posedge clk) if (in_valid && in_ready) sptr <= sptr + 1;
  always_ff @(posedge clk) in_valid <= !gappy || ($urandom_range(0, 2) != 0);

  task automatic run_one(input bit gaps, input bit biased);
    int bad;
    stream = new[672];
    foreach (stream[i]) stream[i] = biased ? (($urandom_range(0, 9) < 8) ? 8'hFF : 8'($urandom))
                                           : 8'($urandom);
    // reference parse
    nexp = 0; nrej = 0;
    for (int i = 0; i < 224; i++) begin
      int c1, c2;
      c1 = stream[3*i] + 256 * (stream[3*i+1] % 16);
      c2 = stream[3*i+1] / 16 + 16 * stream[3*i+2];
      if (c1 < Q) begin if (nexp < 256) expv[nexp] = c1; nexp++; end else nrej++;
      if (c2 < Q) begin if (nexp < 256) expv[nexp] = c2; nexp++; end else nrej++;
    end
    foreach (got[i]) got[i] = -1;
    gappy = gaps;
    sptr  = 0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) begin
      @(negedge clk);
      if (out_valid) begin
        got[2*out_addr]   = int'(out_data[11:0]);
        got[2*out_addr+1] = int'(out_data[23:12]);
      end
      @(posedge clk);
    end
    nbytes_used = sptr;
    @(negedge clk);
    bad = 0;
    for (int i = 0; i < 256 && i < nexp; i++) if (got[i] != expv[i]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL sampled values: %0d differ", bad);
    end
    checks++;
    if (fail != (nexp < 256)) begin
      failures++;
      $display("FAIL fail flag %0d with %0d accepted", fail, nexp);
    end
    checks++;
    if (nbytes_used != 672 || int'(n_rejected) != nrej) begin
      failures++;
      $display("FAIL consumed %0d bytes (672 expected), rejected %0d (exp %0d)",
               nbytes_used, n_rejected, nrej);
    end
    $display("accepted %0d, rejected %0d, fail %0d", nexp, nrej, fail);
  endtask

  initial begin
    start = 0; gappy = 0; sptr = 0;
    stream = new[1];
    stream[0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      run_one(1'b0, 1'b0);
      run_one(1'b1, 1'b0);
    end
    run_one(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
