// log_lut: look-up table for the logarithm term, y = 0.1 * ln(w), with w and y in
// the generator's 20-bit format (12 fraction bits). Purely combinational.
//
// Instead of one entry per input value, the table is split in two. A leading-one
// detector finds the position p of the highest set bit of w, so that
// w = 2^(p-12) * (1 + m/64 + ...), with m the MB = 6 bits below the leading one.
// Then 0.1*ln(w) = 0.1*(p-12)*ln2 + 0.1*ln(1 + m/64 + ...), and the result is
// EXP_TAB[p] + MAN_TAB[m] with
//   EXP_TAB[p] = round(4096 * 0.1 * (p - 12) * ln 2),       p = 0 .. 18
//   MAN_TAB[m] = round(4096 * 0.1 * ln(1 + (m + 0.5)/64)),  m = 0 .. 63
// Both tables are filled at elaboration from these formulas. The error is below
// about 0.0002 (one unit in the last place is 0.00024). A value w <= 0, where the
// logarithm is undefined, is treated as the smallest positive value 2^-12.
// Only the use of a table comes from the design description; the split into
// exponent and mantissa tables and the handling of w <= 0 are this design's own.
module log_lut
  import chaos_pkg::*;
#(
  parameter int unsigned MB = 6
) (
  input  fix_t w,
  output fix_t y
);
  localparam int unsigned NE = DW - 1;   // possible leading-one positions
  localparam real LN2 = 0.6931471805599453;

  fix_t exp_tab [NE];
  fix_t man_tab [2**MB];

  for (genvar p = 0; p < NE; p++) begin : g_exp
    localparam real    EV = 0.1 * (real'(p) - real'(FW)) * LN2 * real'(2**FW);
    localparam integer EI = $rtoi(EV >= 0.0 ? EV + 0.5 : EV - 0.5);
    assign exp_tab[p] = fix_t'(EI);
  end

  for (genvar m = 0; m < 2**MB; m++) begin : g_man
    localparam real    MV = 0.1 * $ln(1.0 + (real'(m) + 0.5) / real'(2**MB)) * real'(2**FW);
    localparam integer MI = $rtoi(MV + 0.5);
    assign man_tab[m] = fix_t'(MI);
  end

  logic [DW-2:0]         mag;
  logic [$clog2(NE)-1:0] pos;
  logic [DW-2:0]         norm;
  logic [MB-1:0]         man;

  always_comb begin
    mag = (w[DW-1] || w == '0) ? (DW-1)'(1) : w[DW-2:0];
    pos = '0;
    for (int unsigned i = 0; i < NE; i++) begin
      if (mag[i]) pos = i[$clog2(NE)-1:0];
    end
    norm = mag << (5'(DW - 2) - pos);
    man  = norm[DW-3 -: MB];
    y    = exp_tab[pos] + man_tab[man];
  end
endmodule
