// log_calc: the log calculation module of the v datapath. It produces
// term = 0.1 * u * ln(w), the logarithmic part of Kv.
//
// In the cycle where ce_lut is high, the table value 0.1*ln(w) from log_lut is
// captured in a register (one-cycle delay). A mult_ip core then multiplies u by
// that register while ce_mul is high; after four enabled clocks its 40-bit
// product, brought back to 20 bits by chaos_pkg::prod_to_fix, is on term.
// Total delay: 1 + 4 cycles. u and w must be held from ce_lut until the product is
// done. Folding the factor 0.1 into the table is this design's choice.
module log_calc
  import chaos_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic ce_lut,
  input  logic ce_mul,
  input  fix_t u,
  input  fix_t w,
  output fix_t term
);
  fix_t  ln_val;
  fix_t  ln_q;
  prod_t prod;

  log_lut u_lut (.w(w), .y(ln_val));

  always_ff @(posedge clk) begin
    if (reset)       ln_q <= '0;
    else if (ce_lut) ln_q <= ln_val;
  end

  mult_ip #(.WIDTH(DW), .STAGES(MUL_LAT)) u_mul (
    .CLK(clk), .CE(ce_mul), .A(u), .B(ln_q), .Q(prod)
  );

  assign term = prod_to_fix(prod);
endmodule
