// tb_ntt_addr_gen: for every stage and pair index of both transforms,
// compares the generated word addresses and twiddle index with the order in
// which the Kyber NTT/INTT loops visit butterflies (two neighbouring
// butterflies per pair), and checks that the two words of a pair always
// fall into different RAM blocks (address parity).
module tb_ntt_addr_gen;
  import kyber_pkg::*;

  logic       inverse;
  logic [2:0] stage;
  logic [5:0] idx;
  logic [6:0] addr_lo, addr_hi, zeta_idx;
  int checks = 0, failures = 0;

  ntt_addr_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int inv = 0; inv < 2; inv++) begin
      int k;
      k = inv ? 127 : 1;
      for (int st = 0; st < 7; st++) begin
        int len, n;
        len = inv ? (2 << st) : (128 >> st);
        n = 0;
        for (int start = 0; start < 256; start += 2 * len) begin
          for (int j = start; j < start + len; j += 2) begin
            inverse = inv[0];
            stage   = 3'(st);
            idx     = 6'(n);
            #1;
            checks++;
            if (int'(addr_lo) != j / 2 || int'(addr_hi) != (j + len) / 2 ||
                int'(zeta_idx) != k || (^addr_lo) == (^addr_hi)) begin
              failures++;
              if (failures < 10)
                $display("FAIL inv=%0d stage=%0d idx=%0d: lo %0d hi %0d z %0d, exp %0d %0d %0d",
                         inv, st, n, addr_lo, addr_hi, zeta_idx, j / 2, (j + len) / 2, k);
            end
            n++;
          end
          k = inv ? k - 1 : k + 1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
