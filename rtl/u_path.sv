// u_path: datapath for u_{k+1} = u_k - (v_k + w_k) * (h + h * h/2).
//
// Three adder20 and two mult_ip instances, wired as the u diagram of the design:
// adder(v, w); multiplier(h, h/2) -> adder(h, .) gives the factor h + h^2/2;
// multiplier of the two; the last adder subtracts the product from u. Each
// operator captures when its enable en[OP_U_*] from the sequencer is high; u, v,
// w and h must hold for the whole iteration. u_next is valid from phase 10 of the
// iteration (chaos_pkg::OP_PHASE) until the next iteration's phase 9.
// h/2 is h shifted right by one bit. The sign of the product term is taken from
// the difference equation, which the diagram leaves out.
module u_path
  import chaos_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  op_en_t en,
  input  fix_t   u,
  input  fix_t   v,
  input  fix_t   w,
  input  fix_t   h,
  output fix_t   u_next
);
  fix_t  h_half;
  fix_t  s_vw, s_fac;
  prod_t p_hh, p_dl;
  logic  unused_c1, unused_c2, unused_c3;

  assign h_half = h >>> 1;

  adder20 u_a1 (.clk(clk), .reset(reset), .ce(en[OP_U_A1]), .sub(1'b0),
                .x(v), .y(w), .s(s_vw), .cout(unused_c1));
  mult_ip u_m1 (.CLK(clk), .CE(en[OP_U_M1]), .A(h), .B(h_half), .Q(p_hh));
  adder20 u_a2 (.clk(clk), .reset(reset), .ce(en[OP_U_A2]), .sub(1'b0),
                .x(h), .y(prod_to_fix(p_hh)), .s(s_fac), .cout(unused_c2));
  mult_ip u_m2 (.CLK(clk), .CE(en[OP_U_M2]), .A(s_vw), .B(s_fac), .Q(p_dl));
  adder20 u_a3 (.clk(clk), .reset(reset), .ce(en[OP_U_A3]), .sub(1'b1),
                .x(u), .y(prod_to_fix(p_dl)), .s(u_next), .cout(unused_c3));
endmodule
