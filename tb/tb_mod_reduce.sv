// tb_mod_reduce: checks the Barrett reduction against x % q for all products
// of the edge values 0, 1, q-1 and for 200000 random products of two values
// below q, plus random 24-bit inputs.
module tb_mod_reduce;
  import kyber_pkg::*;

  logic [23:0] x;
  coef_t       r;
  int checks = 0, failures = 0;

  mod_reduce dut (.x(x), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int v);
    x = 24'(v);
    #1;
    checks++;
    if (int'(r) != v % Q) begin
      failures++;
      if (failures < 10) $display("FAIL %0d mod q: got %0d", v, r);
    end
  endtask

  initial begin
    try(0); try(1); try(Q - 1); try(Q); try((Q - 1) * (Q - 1)); try(24'hFFFFFF);
    for (int i = 0; i < 200000; i++) try($urandom_range(0, Q - 1) * $urandom_range(0, Q - 1));
    for (int i = 0; i < 20000; i++) try($urandom_range(0, 24'hFFFFFF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
