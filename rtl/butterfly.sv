// butterfly: the configurable butterfly unit of the NTT core.  One unit has a
// single modular multiplier (multiplier + reduction), one modular adder and
// one modular subtractor, and a mode input reconfigures the operand routing:
//   mode 0 (CT, NTT):        a = u + w*v,   b = u - w*v
//   mode 1 (GS, INTT):       a = u + v,     b = (u - v)*w
//   mode 2 (point-wise):     a = u + v*w,   b = v*w
// Modes 0 and 1 and the three-mode reconfiguration follow the document's
// butterfly figure; the exact mode-2 function (a multiply-accumulate that the
// core chains into Kyber's base multiplication) is this design's choice, as is
// the pipeline split.
// Timing: fully pipelined, one operation per cycle, latency 3 cycles
// (input registers; multiply + reduce; add/sub into the output registers).
// Interface: in_valid/u/v/w/mode in, out_valid/a/b out, all values in [0, q).
module butterfly
  import kyber_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  bf_mode_e mode,
  input  coef_t    u,
  input  coef_t    v,
  input  coef_t    w,
  output logic     out_valid,
  output coef_t    a,
  output coef_t    b
);
  // stage 0: input registers
  logic     s0_valid;
  bf_mode_e s0_mode;
  coef_t    s0_u, s0_v, s0_w;

  // stage 1: product registered, sum for GS kept alongside
  logic     s1_valid;
  bf_mode_e s1_mode;
  coef_t    s1_u, s1_sum, s1_prod;

  coef_t mul_in;
  coef_t prod_red;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid  <= 1'b0;
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s0_valid  <= in_valid;
      s1_valid  <= s0_valid;
      out_valid <= s1_valid;
    end
  end

  always_ff @(posedge clk) begin
    s0_mode <= mode;
    s0_u    <= u;
    s0_v    <= v;
    s0_w    <= w;
  end

  // multiplier operand: the difference u - v in GS mode, v otherwise
  always_comb mul_in = (s0_mode == BF_GS) ? mod_sub(s0_u, s0_v) : s0_v;

  mod_reduce u_red (
    .x (24'(mul_in) * 24'(s0_w)),
    .r (prod_red)
  );

  always_ff @(posedge clk) begin
    s1_mode <= s0_mode;
    s1_u    <= s0_u;
    s1_sum  <= mod_add(s0_u, s0_v);
    s1_prod <= prod_red;
  end

  always_ff @(posedge clk) begin
    unique case (s1_mode)
      BF_CT: begin
        a <= mod_add(s1_u, s1_prod);
        b <= mod_sub(s1_u, s1_prod);
      end
      BF_GS: begin
        a <= s1_sum;
        b <= s1_prod;
      end
      default: begin
        a <= mod_add(s1_u, s1_prod);
        b <= s1_prod;
      end
    endcase
  end

endmodule
