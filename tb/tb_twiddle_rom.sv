// tb_twiddle_rom: reads all 128 entries of both tables and compares them with
// 17^bitrev7(k) and 17^(2*bitrev7(i)+1) mod q computed by repeated
// multiplication, and with two known values (zeta[1] = 1729, gamma[0] = 17).
module tb_twiddle_rom;
  import kyber_pkg::*;
  import kyber_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [6:0] zeta_idx, gamma_idx;
  coef_t zeta, gamma;
  int checks = 0, failures = 0;

  twiddle_rom dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      zeta_idx  = 7'(k);
      gamma_idx = 7'(127 - k);
      @(negedge clk);
      checks++;
      if (int'(zeta) != pw17(br7(k)) || int'(gamma) != pw17(2 * br7(127 - k) + 1)) begin
        failures++;
        $display("FAIL entry %0d: zeta %0d gamma %0d", k, zeta, gamma);
      end
      if (k == 1) checks++;
      if (k == 127) checks++;
      if (k == 1 && zeta != 12'd1729) begin
        failures++;
        $display("FAIL zeta[1] = %0d", zeta);
      end
      if (k == 127 && gamma != 12'd17) begin
        failures++;
        $display("FAIL gamma[0] = %0d", gamma);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
