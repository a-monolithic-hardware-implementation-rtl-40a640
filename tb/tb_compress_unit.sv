// tb_compress_unit: for d = 1, 4, 5, 10, 11 and every x in [0, q), checks
// compression against round(2^d x / q) mod 2^d, and for every x below 2^d
// checks decompression against round(q x / 2^d), in both halves of the word.
// d = 0 must pass the word through.
module tb_compress_unit;
  import kyber_pkg::*;

  logic       decomp;
  logic [3:0] d;
  word_t      x, y;
  int checks = 0, failures = 0;

  compress_unit dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ds [5] = '{1, 4, 5, 10, 11};

  initial begin
    foreach (ds[k]) begin
      int dd;
      dd = ds[k];
      d = 4'(dd);
      decomp = 0;
      for (int v = 0; v < Q; v++) begin
        int e;
        x = {coef_t'(Q - 1 - v), coef_t'(v)};
        #1;
        e = ((v * (1 << dd) * 2 + Q) / (2 * Q)) % (1 << dd);
        checks++;
        if (int'(y[11:0]) != e || int'(y[23:12]) != ((((Q - 1 - v) * (1 << dd) * 2 + Q) / (2 * Q)) % (1 << dd))) begin
          failures++;
          if (failures < 10) $display("FAIL compress d=%0d x=%0d: %0d exp %0d", dd, v, y[11:0], e);
        end
      end
      decomp = 1;
      for (int v = 0; v < (1 << dd); v++) begin
        int e;
        x = {coef_t'(v), coef_t'(v)};
        #1;
        e = (v * Q * 2 + (1 << dd)) / (1 << (dd + 1));
        checks++;
        if (int'(y[11:0]) != e || int'(y[23:12]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL decompress d=%0d x=%0d: %0d exp %0d", dd, v, y[11:0], e);
        end
      end
    end
    d = 0;
    x = 24'h123ABC;
    #1;
    checks++;
    if (y != x) begin
      failures++;
      $display("FAIL d=0 pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
