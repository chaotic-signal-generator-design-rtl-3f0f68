// tb_adder20: random and corner-case sums and differences of the 20-bit adder.
// Checks the registered result one clock after a single enable cycle, the
// carry-out, that the result holds while ce is low, and reset.
module tb_adder20;
  localparam int W = 20;
  logic clk = 0, reset = 1, ce = 0, sub = 0;
  logic signed [W-1:0] x = '0, y = '0, s;
  logic cout;
  int checks = 0, failures = 0, cycles = 0;

  adder20 dut (.clk(clk), .reset(reset), .ce(ce), .sub(sub), .x(x), .y(y), .s(s), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0d y=%0d sub=%0b s=%0d cout=%0b", what, x, y, sub, s, cout);
    end
  endtask

  task automatic one(logic signed [W-1:0] xa, logic signed [W-1:0] ya, logic sb);
    logic [W:0] full;
    logic signed [W-1:0] held;
    @(negedge clk);
    x = xa; y = ya; sub = sb; ce = 1;
    @(negedge clk);
    ce = 0;
    full = sb ? ({1'b0, xa} + {1'b0, ~ya} + 1) : ({1'b0, xa} + {1'b0, ya});
    check("sum", s == (sb ? xa - ya : xa + ya));
    check("carry", cout == full[W]);
    held = s;
    x = ~xa; y = xa;          // change the operands, no enable
    @(negedge clk);
    check("hold", s == held);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    check("reset", s == 0 && cout == 0);
    one(20'sd5, 20'sd7, 0);
    one(20'sd5, 20'sd7, 1);
    one(-20'sd1, 20'sd1, 0);
    one(20'sh7FFFF, 20'sd1, 0);   // wraps to the most negative value
    one(-20'sd524288, 20'sd1, 1);
    one(20'sd0, 20'sd0, 1);       // carry out set on 0 - 0
    for (int i = 0; i < 400; i++) one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
