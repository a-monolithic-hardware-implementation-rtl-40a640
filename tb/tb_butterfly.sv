// tb_butterfly: drives the butterfly with a new random operation every cycle
// (random mode 0/1/2 and operands in [0, q)) and checks each result, 3 cycles
// later, against the CT, GS and multiply-accumulate formulas computed with
// integer arithmetic.  Checks the 3-cycle latency through out_valid.
module tb_butterfly;
  import kyber_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     in_valid, out_valid;
  bf_mode_e mode;
  coef_t    u, v, w, a, b;
  int checks = 0, failures = 0;

  butterfly dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ea [$], eb [$];
  int iss [$];
  int cyc = 0;

  function automatic int md(input longint x);
    longint r;
    r = x % longint'(Q);
    if (r < 0) r += Q;
    return int'(r);
  endfunction

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    int uu, vv, ww, m, nops;
    in_valid = 0; mode = BF_CT; u = 0; v = 0; w = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    nops = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      m  = $urandom_range(0, 2);
      uu = (i < 3) ? Q - 1 : $urandom_range(0, Q - 1);
      vv = (i < 3) ? Q - 1 : $urandom_range(0, Q - 1);
      ww = (i < 3) ? Q - 1 : $urandom_range(0, Q - 1);
      mode = bf_mode_e'(m);
      u = coef_t'(uu); v = coef_t'(vv); w = coef_t'(ww);
      if (in_valid) begin
        case (m)
          0: begin ea.push_back(md(uu + longint'(ww) * vv)); eb.push_back(md(uu - longint'(ww) * vv)); end
          1: begin ea.push_back(md(uu + vv)); eb.push_back(md(longint'(uu - vv) * ww)); end
          default: begin ea.push_back(md(uu + longint'(vv) * ww)); eb.push_back(md(longint'(vv) * ww)); end
        endcase
        iss.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (ea.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", ea.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (ea.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        int xa, xb, t0;
        xa = ea.pop_front();
        xb = eb.pop_front();
        t0 = iss.pop_front();
        if (int'(a) != xa || int'(b) != xb || cyc - t0 != 3) begin
          failures++;
          if (failures < 10) $display("FAIL got a=%0d b=%0d exp %0d %0d latency %0d", a, b, xa, xb, cyc - t0);
        end
      end
    end
  end
endmodule
