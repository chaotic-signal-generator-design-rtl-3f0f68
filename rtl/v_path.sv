// v_path: datapath for
//   Kv      = h/2 * (u_k + a*v_k + 0.1*u_k*ln(w_k))
//   v_{k+1} = v_k + (Kv + h/2 * ((Kv + u_k) + a*(Kv + v_k)))
// built, as the v diagram of the design, from seven adder20, four mult_ip and the
// log_calc module. Each operator captures when its enable en[OP_V_*] (or
// en[OP_LOG_*]) is high. Kv is ready at phase 10, v_next at phase 26 of the
// iteration (chaos_pkg::OP_PHASE); u, v, w, a and h must hold meanwhile.
// The second stage has no logarithm, as in the diagram.
module v_path
  import chaos_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  op_en_t en,
  input  fix_t   u,
  input  fix_t   v,
  input  fix_t   w,
  input  fix_t   a,
  input  fix_t   h,
  output fix_t   v_next,
  output fix_t   kv
);
  fix_t  h_half;
  fix_t  lterm, s1, s2, s3, s4, s5, s6;
  prod_t p_av, p_kv, p_a2, p_h2;
  logic  [6:0] unused_c;

  assign h_half = h >>> 1;

  mult_ip  u_m1 (.CLK(clk), .CE(en[OP_V_M1]), .A(v), .B(a), .Q(p_av));
  log_calc u_log (.clk(clk), .reset(reset), .ce_lut(en[OP_LOG_LUT]), .ce_mul(en[OP_LOG_MUL]),
                  .u(u), .w(w), .term(lterm));
  adder20  u_a1 (.clk(clk), .reset(reset), .ce(en[OP_V_A1]), .sub(1'b0),
                 .x(u), .y(prod_to_fix(p_av)), .s(s1), .cout(unused_c[0]));
  adder20  u_a2 (.clk(clk), .reset(reset), .ce(en[OP_V_A2]), .sub(1'b0),
                 .x(s1), .y(lterm), .s(s2), .cout(unused_c[1]));
  mult_ip  u_m2 (.CLK(clk), .CE(en[OP_V_M2]), .A(s2), .B(h_half), .Q(p_kv));
  assign kv = prod_to_fix(p_kv);

  adder20  u_a3 (.clk(clk), .reset(reset), .ce(en[OP_V_A3]), .sub(1'b0),
                 .x(kv), .y(u), .s(s3), .cout(unused_c[2]));
  adder20  u_a4 (.clk(clk), .reset(reset), .ce(en[OP_V_A4]), .sub(1'b0),
                 .x(kv), .y(v), .s(s4), .cout(unused_c[3]));
  mult_ip  u_m3 (.CLK(clk), .CE(en[OP_V_M3]), .A(s4), .B(a), .Q(p_a2));
  adder20  u_a5 (.clk(clk), .reset(reset), .ce(en[OP_V_A5]), .sub(1'b0),
                 .x(s3), .y(prod_to_fix(p_a2)), .s(s5), .cout(unused_c[4]));
  mult_ip  u_m4 (.CLK(clk), .CE(en[OP_V_M4]), .A(s5), .B(h_half), .Q(p_h2));
  adder20  u_a6 (.clk(clk), .reset(reset), .ce(en[OP_V_A6]), .sub(1'b0),
                 .x(kv), .y(prod_to_fix(p_h2)), .s(s6), .cout(unused_c[5]));
  adder20  u_a7 (.clk(clk), .reset(reset), .ce(en[OP_V_A7]), .sub(1'b0),
                 .x(v), .y(s6), .s(v_next), .cout(unused_c[6]));
endmodule
