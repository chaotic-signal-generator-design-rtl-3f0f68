// adder20: WIDTH-bit two's-complement adder/subtractor of the datapaths.
//
// A chain of full_adder cells adds the operands from the least significant bit
// up, each cell passing its carry to the next (ripple carry), as the N-bit adder
// of the design is drawn. For subtraction the second operand is inverted and the
// carry-in C0 is set, giving x - y. The sum and the final carry C_N are captured
// in registers when ce is high, so a result appears one clock after the enable:
// the adder's one-cycle calculation delay. With ce low the result holds.
// The subtract mode and the synchronous active-high reset are this design's choices.
module adder20 #(
  parameter int unsigned WIDTH = 20
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    ce,
  input  logic                    sub,
  input  logic signed [WIDTH-1:0] x,
  input  logic signed [WIDTH-1:0] y,
  output logic signed [WIDTH-1:0] s,
  output logic                    cout
);
  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] yy;
  logic [WIDTH-1:0] sum;

  assign c[0] = sub;
  assign yy   = sub ? ~y : y;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.x(x[i]), .y(yy[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      s    <= '0;
      cout <= 1'b0;
    end else if (ce) begin
      s    <= sum;
      cout <= c[WIDTH];
    end
  end
endmodule
