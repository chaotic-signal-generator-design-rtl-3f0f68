// chaos_pkg: number format, timing constants and the operator schedule shared by
// the chaotic signal generator.
//
// Numbers are 20-bit two's complement with 12 fraction bits (1 sign bit, 7 integer
// bits, range -128 .. +128). A 40-bit product is brought back to this format by
// shifting it 12 bits right and keeping the product's sign bit above the 19 low
// bits of the shifted value, which is exact whenever the product is in range.
//
// Timing: the adders have a 1-cycle delay and are enabled 2 cycles out of every 20;
// the multipliers have a 4-cycle delay and are enabled 5 cycles out of every 20.
// One iteration of the difference equations spans FRAMES_PER_ITER frames of
// FRAME_CYCLES cycles (the two-frame iteration is this design's choice: the longest
// chain of operators needs 23 cycles). Every operator fires once per iteration, in
// an enable window that starts at its phase in OP_PHASE and never crosses a frame.
package chaos_pkg;

  parameter int unsigned DW = 20;   // data width
  parameter int unsigned FW = 12;   // fraction bits

  typedef logic signed [DW-1:0]   fix_t;
  typedef logic signed [2*DW-1:0] prod_t;

  parameter int unsigned FRAME_CYCLES    = 20;
  parameter int unsigned ADD_CE_HIGH     = 2;
  parameter int unsigned MUL_CE_HIGH     = 5;
  parameter int unsigned ADD_LAT         = 1;
  parameter int unsigned MUL_LAT         = 4;
  parameter int unsigned FRAMES_PER_ITER = 2;
  parameter int unsigned ITER_CYCLES     = FRAME_CYCLES * FRAMES_PER_ITER;
  parameter int unsigned FRAME_BITS      = (FRAMES_PER_ITER > 1) ? $clog2(FRAMES_PER_ITER) : 1;

  // Every clock-enabled operator of the three datapaths of the generator.
  typedef enum logic [4:0] {
    OP_U_A1, OP_U_M1, OP_U_A2, OP_U_M2, OP_U_A3,
    OP_V_M1, OP_LOG_LUT, OP_LOG_MUL, OP_V_A1, OP_V_A2, OP_V_M2,
    OP_V_A3, OP_V_A4, OP_V_M3, OP_V_A5, OP_V_M4, OP_V_A6, OP_V_A7,
    OP_W_A1, OP_W_M1, OP_W_A2, OP_W_M2, OP_W_A3, OP_W_A4, OP_W_A5,
    OP_W_M3, OP_W_A6, OP_W_M4, OP_W_A7, OP_W_A8,
    OP_LOAD
  } op_e;

  parameter int unsigned N_OPS = 31;

  typedef logic [N_OPS-1:0] op_en_t;

  // Start phase (cycle within the iteration) of each operator, indexed by op_e.
  typedef int unsigned phase_tab_t [N_OPS];
  parameter phase_tab_t OP_PHASE = '{
    0, 0, 4, 5, 9,                       // u: v+w, h*h/2, h+.., *(v+w), u-..
    0, 0, 1, 4, 5, 6,                    // v: a*v, ln table, u*0.1ln w, u+av, +log, *h/2 = Kv
    10, 10, 11, 15, 20, 24, 25,          // v: Kv+u, Kv+v, a*(..), +, *h/2, Kv+.., v+..
    0, 1, 5, 6, 10, 10, 11,              // w: u-b, w*(..), +c, *h/2 = Kw, w+Kw, Kw+u, -b
    12, 16, 20, 24, 25,                  // w: (..)*(..), +c, *h/2, Kw+.., w+..
    26                                   // load u, v, w
  };

  // 1 where the operator uses the multiplier enable pulse (5 cycles), 0 where it
  // uses the adder enable pulse (2 cycles).
  parameter logic [N_OPS-1:0] OP_IS_MUL = N_OPS'(
      (1 << OP_U_M1) | (1 << OP_U_M2) | (1 << OP_V_M1) | (1 << OP_LOG_MUL) |
      (1 << OP_V_M2) | (1 << OP_V_M3) | (1 << OP_V_M4) | (1 << OP_W_M1) |
      (1 << OP_W_M2) | (1 << OP_W_M3) | (1 << OP_W_M4));

  // 40-bit product to the 20-bit format: shift right by FW, keep the sign bit.
  function automatic fix_t prod_to_fix(prod_t p);
    return {p[2*DW-1], p[FW+DW-2:FW]};
  endfunction

endpackage
