// tb_poly_cache: fills every word of every polynomial with random data, then
// reads all of them back in random order and compares; also checks that a
// read returns the old contents when the same word is written in that cycle.
module tb_poly_cache;
  import kyber_pkg::*;

  localparam int NP = 25;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       we, re;
  logic [4:0] wpoly, rpoly;
  logic [6:0] waddr, raddr;
  word_t      wdata, rdata;
  int checks = 0, failures = 0;
  word_t model [NP][128];

  poly_cache #(.NPOLY(NP)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wpoly = 0; rpoly = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int p = 0; p < NP; p++)
      for (int m = 0; m < 128; m++) begin
        @(negedge clk);
        we = 1; wpoly = 5'(p); waddr = 7'(m); wdata = word_t'($urandom);
        model[p][m] = wdata;
      end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 4000; i++) begin
      int p, m;
      p = $urandom_range(0, NP - 1);
      m = $urandom_range(0, 127);
      @(negedge clk);
      re = 1; rpoly = 5'(p); raddr = 7'(m);
      // simultaneous write to the same word
      we = (i % 7 == 0); wpoly = 5'(p); waddr = 7'(m); wdata = word_t'($urandom);
      @(negedge clk);
      re = 0; we = 0;
      checks++;
      if (rdata != model[p][m]) begin
        failures++;
        if (failures < 10) $display("FAIL poly %0d word %0d: %h exp %h", p, m, rdata, model[p][m]);
      end
      if (i % 7 == 0) model[p][m] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
