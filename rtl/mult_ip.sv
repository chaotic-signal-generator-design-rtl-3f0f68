// mult_ip: signed WIDTH x WIDTH multiplier with a 2*WIDTH-bit product, clock
// enable CE and clock CLK (the Mult_IP core of the design).
//
// The product is formed by the shift-and-add rule for two's-complement numbers:
// the multiplicand A is sign-extended to 2*WIDTH bits, and for every set bit i of
// the multiplier B, A shifted left by i is added to the running sum; the sign bit
// of B weighs -2^(WIDTH-1), so its partial product is subtracted.
// The bits of B are processed in STAGES pipeline stages (WIDTH/STAGES bits each,
// rounded up); every stage register advances only while CE is high. With the
// operands held, Q is the product after STAGES enabled clocks (4 by default: the
// multiplier's four-cycle delay) and holds while CE stays low. The subtraction of
// the sign-bit partial product and the split into stages are this design's own.
module mult_ip #(
  parameter int unsigned WIDTH  = 20,
  parameter int unsigned STAGES = 4
) (
  input  logic                      CLK,
  input  logic                      CE,
  input  logic signed [WIDTH-1:0]   A,
  input  logic signed [WIDTH-1:0]   B,
  output logic signed [2*WIDTH-1:0] Q
);
  localparam int unsigned BPS = (WIDTH + STAGES - 1) / STAGES;  // multiplier bits per stage

  typedef logic signed [2*WIDTH-1:0] wide_t;

  // Pipeline registers of stage k: sign-extended multiplicand, multiplier, sum so far.
  wide_t            m_q   [STAGES];
  logic [WIDTH-1:0] b_q   [STAGES];
  wide_t            acc_q [STAGES];

  // Partial sum after adding multiplier bits [k*BPS, (k+1)*BPS) to acc.
  function automatic wide_t stage_sum(int unsigned k, wide_t mcand, logic [WIDTH-1:0] mplier, wide_t acc);
    wide_t r;
    r = acc;
    for (int unsigned j = 0; j < BPS; j++) begin
      int unsigned i;
      i = k * BPS + j;
      if (i < WIDTH && mplier[i]) begin
        if (i == WIDTH - 1) r = r - (mcand <<< i);
        else                r = r + (mcand <<< i);
      end
    end
    return r;
  endfunction

  always_ff @(posedge CLK) begin
    if (CE) begin
      m_q[0]   <= wide_t'(A);
      b_q[0]   <= B;
      acc_q[0] <= stage_sum(0, wide_t'(A), B, '0);
      for (int unsigned k = 1; k < STAGES; k++) begin
        m_q[k]   <= m_q[k-1];
        b_q[k]   <= b_q[k-1];
        acc_q[k] <= stage_sum(k, m_q[k-1], b_q[k-1], acc_q[k-1]);
      end
    end
  end

  assign Q = acc_q[STAGES-1];
endmodule
