// w_path: datapath for
//   Kw      = h/2 * (c + w_k*(u_k - b))
//   w_{k+1} = w_k + (Kw + h/2 * (c + (w_k + Kw)*((Kw + u_k) - b)))
// built, as the w diagram of the design, from eight adder20 and four mult_ip.
// The adders that take b subtract, those that take c add (signs as in the
// difference equation). Each operator captures when its enable en[OP_W_*] is
// high. Kw is ready at phase 10, w_next at phase 26 of the iteration
// (chaos_pkg::OP_PHASE); u, w, b, c and h must hold meanwhile. This is the
// longest chain of the generator: 7 adders and 4 multipliers in series, 23
// cycles of delay before the frame alignment.
module w_path
  import chaos_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  op_en_t en,
  input  fix_t   u,
  input  fix_t   w,
  input  fix_t   b,
  input  fix_t   c,
  input  fix_t   h,
  output fix_t   w_next,
  output fix_t   kw
);
  fix_t  h_half;
  fix_t  s1, s2, s3, s4, s5, s6, s7;
  prod_t p1, p_kw, p3, p4;
  logic  [7:0] unused_c;

  assign h_half = h >>> 1;

  adder20 u_a1 (.clk(clk), .reset(reset), .ce(en[OP_W_A1]), .sub(1'b1),
                .x(u), .y(b), .s(s1), .cout(unused_c[0]));
  mult_ip u_m1 (.CLK(clk), .CE(en[OP_W_M1]), .A(w), .B(s1), .Q(p1));
  adder20 u_a2 (.clk(clk), .reset(reset), .ce(en[OP_W_A2]), .sub(1'b0),
                .x(prod_to_fix(p1)), .y(c), .s(s2), .cout(unused_c[1]));
  mult_ip u_m2 (.CLK(clk), .CE(en[OP_W_M2]), .A(s2), .B(h_half), .Q(p_kw));
  assign kw = prod_to_fix(p_kw);

  adder20 u_a3 (.clk(clk), .reset(reset), .ce(en[OP_W_A3]), .sub(1'b0),
                .x(w), .y(kw), .s(s3), .cout(unused_c[2]));
  adder20 u_a4 (.clk(clk), .reset(reset), .ce(en[OP_W_A4]), .sub(1'b0),
                .x(kw), .y(u), .s(s4), .cout(unused_c[3]));
  adder20 u_a5 (.clk(clk), .reset(reset), .ce(en[OP_W_A5]), .sub(1'b1),
                .x(s4), .y(b), .s(s5), .cout(unused_c[4]));
  mult_ip u_m3 (.CLK(clk), .CE(en[OP_W_M3]), .A(s3), .B(s5), .Q(p3));
  adder20 u_a6 (.clk(clk), .reset(reset), .ce(en[OP_W_A6]), .sub(1'b0),
                .x(prod_to_fix(p3)), .y(c), .s(s6), .cout(unused_c[5]));
  mult_ip u_m4 (.CLK(clk), .CE(en[OP_W_M4]), .A(s6), .B(h_half), .Q(p4));
  adder20 u_a7 (.clk(clk), .reset(reset), .ce(en[OP_W_A7]), .sub(1'b0),
                .x(kw), .y(prod_to_fix(p4)), .s(s7), .cout(unused_c[6]));
  adder20 u_a8 (.clk(clk), .reset(reset), .ce(en[OP_W_A8]), .sub(1'b0),
                .x(w), .y(s7), .s(w_next), .cout(unused_c[7]));
endmodule
