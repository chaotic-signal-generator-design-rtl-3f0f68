// sequencer: makes the clock enable of every operator of the generator.
//
// Two ce_divider instances turn the main clock into the two enable pulses of the
// design: the adder pulse, high 2 of every FRAME_CYCLES (20) cycles, and the
// multiplier pulse, high 5 of every 20 cycles. Two shift_reg delay lines of
// FRAME_CYCLES-1 stages delay each pulse; an operator whose start phase in
// chaos_pkg::OP_PHASE is P takes the tap at delay P mod 20 of its pulse type,
// gated by a frame counter so that it fires only in frame P / 20 of the
// FRAMES_PER_ITER frames of an iteration. Every operator therefore sees exactly one
// enable window per iteration (ITER_CYCLES = 40 cycles), 2 cycles wide for adders,
// the table register and the state load, 5 cycles wide for multipliers.
//
// en is indexed by chaos_pkg::op_e. frame is the index of the current frame.
// After reset the first frame and the first iteration start at once.
// The dividers and their pulse widths follow the design description; the delay
// lines with one tap per operator, the frame counter and the schedule are this
// design's own.
module sequencer
  import chaos_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  output op_en_t                en,
  output logic [FRAME_BITS-1:0] frame
);
  localparam int unsigned NDLY = FRAME_CYCLES - 1;

  logic add_pulse, mul_pulse, add_last, mul_last;
  logic add_taps [NDLY];
  logic mul_taps [NDLY];
  logic add_dout, mul_dout;

  ce_divider #(.PERIOD(FRAME_CYCLES), .HIGH(ADD_CE_HIGH)) u_add_div (
    .clk(clk), .reset(reset), .ce(add_pulse), .last(add_last)
  );
  ce_divider #(.PERIOD(FRAME_CYCLES), .HIGH(MUL_CE_HIGH)) u_mul_div (
    .clk(clk), .reset(reset), .ce(mul_pulse), .last(mul_last)
  );

  shift_reg #(.WIDTH(1), .DEPTH(NDLY)) u_add_dly (
    .clk(clk), .reset(reset), .din(add_pulse), .dout(add_dout), .taps(add_taps)
  );
  shift_reg #(.WIDTH(1), .DEPTH(NDLY)) u_mul_dly (
    .clk(clk), .reset(reset), .din(mul_pulse), .dout(mul_dout), .taps(mul_taps)
  );

  always_ff @(posedge clk) begin
    if (reset)         frame <= '0;
    else if (add_last) frame <= (frame == FRAME_BITS'(FRAMES_PER_ITER - 1)) ? '0 : frame + 1'b1;
  end

  for (genvar i = 0; i < N_OPS; i++) begin : g_op
    localparam int unsigned D = OP_PHASE[i] % FRAME_CYCLES;
    localparam int unsigned F = OP_PHASE[i] / FRAME_CYCLES;
    localparam bit          M = OP_IS_MUL[i];
    logic pulse;
    if (D == 0) begin : g_now
      assign pulse = M ? mul_pulse : add_pulse;
    end else begin : g_dly
      assign pulse = M ? mul_taps[D-1] : add_taps[D-1];
    end
    assign en[i] = pulse && (frame == FRAME_BITS'(F));

    // The enable window must lie inside one frame of the iteration.
    if (D + (M ? MUL_CE_HIGH : ADD_CE_HIGH) > FRAME_CYCLES || F >= FRAMES_PER_ITER) begin : g_bad
      $error("sequencer: operator %0d has an enable window outside its frame", i);
    end
  end

  // The two dividers run in step; the delay lines' last stages mirror the pulses.
  always_ff @(posedge clk) begin
    if (!reset) begin
      assert (add_last == mul_last) else $error("sequencer: dividers out of step");
      assert (add_dout == add_taps[NDLY-1] && mul_dout == mul_taps[NDLY-1])
        else $error("sequencer: delay line output mismatch");
    end
  end
endmodule
