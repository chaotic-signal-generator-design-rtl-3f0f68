// chaos_generator: digital chaotic signal generator. It iterates a discretised
// three-variable Rossler-type system
//   du/dt = -v - w,   dv/dt = u + a v + 0.1 u ln(w),   dw/dt = c + w (u - b)
// with a second-order Runge-Kutta style step of length h, in 20-bit fixed point
// (12 fraction bits), and puts out one new (u, v, w) every ITER_CYCLES = 40 clocks.
//
// Structure: the state registers u, v, w feed three datapaths (u_path, v_path,
// w_path) made of ripple-carry adders, shift-and-add multipliers and a logarithm
// look-up table. The sequencer gives every operator one enable window per
// iteration, at the phase listed in chaos_pkg::OP_PHASE. At phase 26 all three
// results are loaded into the state registers together, so every operator of an
// iteration works on the same u_k, v_k, w_k.
//
// Interface: a, b, c, h are the model constants and the step length, u0, v0, w0
// the initial state, all in the 20-bit format; they must hold while the generator
// runs. reset (synchronous, active high) loads u0, v0, w0 and restarts the
// schedule. valid is high for one cycle each time u, v, w have just taken new
// values: in phase 27 of every iteration, phase 0 being the clock period that
// ends with the first rising edge at which reset is low; so one every 40 cycles. frame is the index of the 20-cycle frame within an iteration.
// The equations, operator network, number format and the 1- and 4-cycle operator
// delays follow the design description; the two-frame iteration, the phase table,
// the state load and the valid/frame outputs are this design's own.
module chaos_generator
  import chaos_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  input  fix_t                  a,
  input  fix_t                  b,
  input  fix_t                  c,
  input  fix_t                  h,
  input  fix_t                  u0,
  input  fix_t                  v0,
  input  fix_t                  w0,
  output fix_t                  u,
  output fix_t                  v,
  output fix_t                  w,
  output logic                  valid,
  output logic [FRAME_BITS-1:0] frame
);
  op_en_t en;
  fix_t   u_next, v_next, w_next, kv, kw;
  logic   load_q;

  sequencer u_seq (.clk(clk), .reset(reset), .en(en), .frame(frame));

  u_path u_up (.clk(clk), .reset(reset), .en(en), .u(u), .v(v), .w(w), .h(h),
               .u_next(u_next));
  v_path u_vp (.clk(clk), .reset(reset), .en(en), .u(u), .v(v), .w(w), .a(a), .h(h),
               .v_next(v_next), .kv(kv));
  w_path u_wp (.clk(clk), .reset(reset), .en(en), .u(u), .w(w), .b(b), .c(c), .h(h),
               .w_next(w_next), .kw(kw));

  always_ff @(posedge clk) begin
    if (reset) begin
      u      <= u0;
      v      <= v0;
      w      <= w0;
      load_q <= 1'b0;
      valid  <= 1'b0;
    end else begin
      if (en[OP_LOAD]) begin
        u <= u_next;
        v <= v_next;
        w <= w_next;
      end
      load_q <= en[OP_LOAD];
      valid  <= en[OP_LOAD] && !load_q;
    end
  end

  // Kv and Kw are internal results; only the new state leaves the generator.
  logic unused_k;
  assign unused_k = ^{kv, kw};
endmodule
