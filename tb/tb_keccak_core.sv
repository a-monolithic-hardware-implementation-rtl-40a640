// tb_keccak_core: self-checking test of the SHAKE engine.
// Known answers: the first 32 output bytes of SHAKE128("") and SHAKE256("")
// (published FIPS 202 test values).  Then random 34-byte (SHAKE128) and
// 33-byte (SHAKE256) messages, squeezed for several rate blocks with a
// randomly stalling consumer, are compared byte by byte with the behavioural
// model.  Also checks the latency from the last lane to the first byte (26
// cycles) and that, with an always-ready consumer, output bytes follow each
// other without gaps (the permutation hidden behind the PISO).
module tb_keccak_core;
  import kyber_pkg::*;
  import kyber_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, shake256, stop, in_valid, in_last, in_ready;
  logic [7:0]  msg_len;
  logic [63:0] in_lane;
  logic        out_valid, out_ready, busy;
  logic [7:0]  out_byte;

  keccak_core dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hash msg, collect nout bytes; stall_pct: chance of out_ready low
  task automatic hash(input logic s256, input bytes_t msg, input int nout,
                      input int stall_pct, output bytes_t got,
                      output int first_lat, output int gaps);
    int nl, cyc, n;
    logic seen;
    got = new[nout];
    nl = msg.size() / 8 + 1;
    shake256 <= s256;
    msg_len  <= 8'(msg.size());
    start    <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int l = 0; l < nl; l++) begin
      logic [63:0] lane;
      lane = '0;
      for (int b = 0; b < 8; b++) if (8*l + b < msg.size()) lane[8*b +: 8] = msg[8*l + b];
      in_valid <= 1'b1;
      in_lane  <= lane;
      in_last  <= (l == nl - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    cyc = 0; n = 0; seen = 0; gaps = 0; first_lat = 0;
    while (n < nout) begin
      out_ready <= ($urandom_range(0, 99) >= stall_pct);
      @(negedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        if (!seen) first_lat = cyc;
        seen = 1;
        got[n] = out_byte;
        n++;
      end else if (seen && out_ready) begin
        gaps++;
      end
      @(posedge clk);
    end
    out_ready <= 1'b0;
    stop <= 1'b1;
    @(posedge clk);
    stop <= 1'b0;
  endtask

  task automatic expect_eq(input string what, input bytes_t e, input bytes_t g);
    int bad;
    bad = 0;
    foreach (e[i]) if (e[i] != g[i]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d bytes differ, first byte exp %02x got %02x", what, bad, e[0], g[0]);
    end
  endtask

  bytes_t empty, m34, m33, got, exp_b;
  int lat, gaps;
  logic [255:0] kat128, kat256;

  initial begin
    start = 0; shake256 = 0; stop = 0; in_valid = 0; in_last = 0;
    in_lane = '0; msg_len = '0; out_ready = 0;
    kat128 = 256'h7f9c2ba4e88f827d616045507605853ed73b8093f6efbc88eb1a6eacfa66ef26;
    kat256 = 256'h46b9dd2b0ba88d13233b3feb743eeb243fcd52ea62b81b82b50c27646ed5762f;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    empty = new[0];
    exp_b = new[32];
    hash(1'b0, empty, 32, 0, got, lat, gaps);
    for (int i = 0; i < 32; i++) exp_b[i] = kat128[255 - 8*i -: 8];
    expect_eq("SHAKE128 known answer", exp_b, got);
    hash(1'b1, empty, 32, 0, got, lat, gaps);
    for (int i = 0; i < 32; i++) exp_b[i] = kat256[255 - 8*i -: 8];
    expect_eq("SHAKE256 known answer", exp_b, got);

    m34 = new[34];
    m33 = new[33];
    for (int t = 0; t < 3; t++) begin
      foreach (m34[i]) m34[i] = 8'($urandom);
      foreach (m33[i]) m33[i] = 8'($urandom);
      hash(1'b0, m34, 4 * 168, 0, got, lat, gaps);
      expect_eq("SHAKE128 4 blocks", ref_shake(168, m34, 4 * 168), got);
      checks++;
      if (lat != 26 || gaps != 0) begin
        failures++;
        $display("FAIL SHAKE128 timing: first byte after %0d cycles, %0d gaps", lat, gaps);
      end
      hash(1'b1, m33, 3 * 136 + 20, 30, got, lat, gaps);
      expect_eq("SHAKE256 with stalls", ref_shake(136, m33, 3 * 136 + 20), got);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
