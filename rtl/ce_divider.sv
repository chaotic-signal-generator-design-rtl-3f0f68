// ce_divider: divides the main clock into a clock-enable pulse. A counter runs
// from 0 to PERIOD-1; ce is high while the count is below HIGH, so ce is high for
// HIGH cycles and low for PERIOD-HIGH cycles (2 high and 18 low for the adders,
// 5 high and 15 low for the multipliers). last marks the final cycle of each
// period. After reset the count is 0, so ce is high in the first cycle.
// The counter realisation, last and the synchronous active-high reset are this
// design's choices.
module ce_divider #(
  parameter int unsigned PERIOD = 20,
  parameter int unsigned HIGH   = 2
) (
  input  logic clk,
  input  logic reset,
  output logic ce,
  output logic last
);
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (reset)                         cnt <= '0;
    else if (cnt == CW'(PERIOD - 1))   cnt <= '0;
    else                               cnt <= cnt + 1'b1;
  end

  assign ce   = (cnt < CW'(HIGH));
  assign last = (cnt == CW'(PERIOD - 1));

  initial begin
    assert (HIGH > 0 && HIGH < PERIOD) else $error("ce_divider: HIGH must lie in 1..PERIOD-1");
  end
endmodule
