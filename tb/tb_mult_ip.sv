// tb_mult_ip: signed products of the multiplier core against the integer
// product. The worked examples (+14)(+11) = 154 and (-14)(+11) = -154 come first,
// then corner cases (most negative operands) and random operands. Checks that the
// product appears after exactly four enabled clocks (not after three) and that Q
// holds while CE is low.
module tb_mult_ip;
  localparam int W = 20;
  logic clk = 0, ce = 0;
  logic signed [W-1:0] a = '0, b = '0;
  logic signed [2*W-1:0] q;
  int checks = 0, failures = 0, cycles = 0;

  mult_ip dut (.CLK(clk), .CE(ce), .A(a), .B(b), .Q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d q=%0d expected %0d", what, a, b, q, longint'(a) * longint'(b));
    end
  endtask

  // Enable window of 5 cycles, as the generator uses it.
  task automatic one(logic signed [W-1:0] xa, logic signed [W-1:0] xb);
    longint exp_p, prev;
    logic signed [2*W-1:0] held;
    exp_p = longint'(xa) * longint'(xb);
    @(negedge clk);
    prev = longint'(q);
    a = xa; b = xb; ce = 1;
    repeat (3) @(negedge clk);
    if (prev != exp_p) check("not ready after 3", longint'(q) != exp_p);
    @(negedge clk);
    check("product after 4", longint'(q) == exp_p);
    @(negedge clk);
    ce = 0;
    check("product after 5", longint'(q) == exp_p);
    held = q;
    a = ~xa; b = ~xb;
    repeat (3) @(negedge clk);
    check("hold", q == held);
  endtask

  initial begin
    one(20'sd14, 20'sd11);
    one(-20'sd14, 20'sd11);
    one(20'sd14, -20'sd11);
    one(-20'sd14, -20'sd11);
    one(-20'sd524288, -20'sd524288);
    one(-20'sd524288, 20'sd524287);
    one(20'sd524287, 20'sd524287);
    one(20'sd0, -20'sd1);
    for (int i = 0; i < 300; i++) one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
