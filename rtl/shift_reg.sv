// shift_reg: DEPTH D flip-flops in series on a common clock. dout is din delayed
// by DEPTH clock cycles; taps[i] is the output of flip-flop i, i.e. din delayed
// i+1 cycles. With the defaults (1 bit, 4 stages) it is the four-cycle delay line
// of the design; the generator's sequencer uses longer ones to delay the
// operator enable pulses. WIDTH, the taps output and the synchronous active-high
// reset (clears every stage) are this design's additions.
module shift_reg #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic [WIDTH-1:0] taps [DEPTH]
);
  logic [WIDTH-1:0] q [DEPTH];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int unsigned i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      q[0] <= din;
      for (int unsigned i = 1; i < DEPTH; i++) q[i] <= q[i-1];
    end
  end

  assign taps = q;
  assign dout = q[DEPTH-1];
endmodule
