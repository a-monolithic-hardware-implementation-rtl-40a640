// tb_kyber_rounds: the rejection-sampling configurations side by side.
// kyber_top is built with 3, 4 and 5 Keccak output blocks per a_hat (4032,
// 5376 and 6720 bits) and, to force the failure path, with 1 block (112
// candidates, always too few).  Each instance runs one full operation; the
// test checks the result or the fail flag, and that the operation time grows
// by exactly 168 cycles per extra block (one byte per cycle), i.e. that the
// sampling time depends only on the number of rounds.
module tb_kyber_rounds;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin [4];
  int   chk [4], fl [4], cyc [4], fs [4];
  int   checks = 0, failures = 0;

  kyber_top_checker #(.ROUNDS(3), .SEED(11)) u_r3 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .cycles(cyc[0]), .fails_seen(fs[0]));
  kyber_top_checker #(.ROUNDS(4), .SEED(11)) u_r4 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .cycles(cyc[1]), .fails_seen(fs[1]));
  kyber_top_checker #(.ROUNDS(5), .SEED(11)) u_r5 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .cycles(cyc[2]), .fails_seen(fs[2]));
  kyber_top_checker #(.ROUNDS(1), .SEED(11)) u_r1 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]), .cycles(cyc[3]), .fails_seen(fs[3]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int i = 0; i < 4; i++) begin
      checks   += chk[i];
      failures += fl[i];
    end
    $display("cycles: 3 rounds %0d, 4 rounds %0d, 5 rounds %0d, 1 round %0d", cyc[0], cyc[1], cyc[2], cyc[3]);
    checks++;
    if (cyc[1] - cyc[0] != 168 || cyc[2] - cyc[1] != 168) begin
      failures++;
      $display("FAIL operation time does not grow by one block (168 cycles) per round");
    end
    checks++;
    if (fs[3] == 0) begin
      failures++;
      $display("FAIL one round never raised the failure flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
