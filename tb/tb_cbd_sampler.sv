// tb_cbd_sampler: self-checking test of the binomial sampler.
// Random byte streams (with and without gaps in valid) are sampled for
// eta = 2 and eta = 3 and every output word is compared with the reference
// CBD computed from the same bytes.  Checks the rate: with a continuous
// input, eta = 2 gives one word (two samples) per cycle.
module tb_cbd_sampler;
  import kyber_pkg::*;
  import kyber_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, eta3, in_valid, in_ready, out_valid, done;
  logic [7:0] in_byte;
  logic [6:0] out_addr;
  word_t      out_data;

  cbd_sampler dut (.*);

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
  int     bad, nout, cyc;

  always_comb in_byte = stream[sptr % stream.size()];
  always_ff @(posedge clk) if (in_valid && in_ready) sptr <= sptr + 1;
  always_ff @(posedge clk) in_valid <= !gappy || ($urandom_range(0, 2) != 0);

  task automatic run_one(input int eta, input bit gaps);
    stream = new[64 * eta];
    foreach (stream[i]) stream[i] = 8'($urandom);
    stream[0] = 8'hFF; stream[1] = 8'h00;   // extreme samples
    gappy = gaps;
    sptr  = 0;
    eta3  <= (eta == 3);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    bad = 0; nout = 0; cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (out_valid) begin
        if (int'(out_addr) != nout) bad++;
        if (int'(out_data[11:0])  != ref_cbd(stream, eta, 2 * nout) ||
            int'(out_data[23:12]) != ref_cbd(stream, eta, 2 * nout + 1)) bad++;
        nout++;
      end
      @(posedge clk);
    end
    checks++;
    if (bad != 0 || nout != 128) begin
      failures++;
      $display("FAIL eta=%0d gaps=%0d: %0d bad words, %0d words", eta, gaps, bad, nout);
    end
    if (eta == 2 && !gaps) begin
      checks++;
      $display("eta=2: 128 words in %0d cycles", cyc);
      if (cyc > 131) begin
        failures++;
        $display("FAIL eta=2 rate: %0d cycles for 128 words", cyc);
      end
    end
  endtask

  initial begin
    start = 0; eta3 = 0; gappy = 0; sptr = 0;
    stream = new[1];
    stream[0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      run_one(2, 1'b0);
      run_one(3, 1'b0);
      run_one(2, 1'b1);
      run_one(3, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
