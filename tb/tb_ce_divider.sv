// tb_ce_divider: checks the adder enable (2 high, 18 low) and the multiplier
// enable (5 high, 15 low) over several periods after reset, and the last flag.
module tb_ce_divider;
  logic clk = 0, reset = 1;
  logic ce_a, last_a, ce_m, last_m;
  int checks = 0, failures = 0, cycles = 0;
  int highs_a = 0, highs_m = 0;

  ce_divider dut_a (.clk(clk), .reset(reset), .ce(ce_a), .last(last_a));
  ce_divider #(.PERIOD(20), .HIGH(5)) dut_m (.clk(clk), .reset(reset), .ce(ce_m), .last(last_m));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 200; t++) begin
      checks += 4;
      if (ce_a != ((t % 20) < 2))   begin failures++; $display("FAIL adder t=%0d ce=%b", t, ce_a); end
      if (ce_m != ((t % 20) < 5))   begin failures++; $display("FAIL mult t=%0d ce=%b", t, ce_m); end
      if (last_a != ((t % 20) == 19)) failures++;
      if (last_m != ((t % 20) == 19)) failures++;
      highs_a += ce_a; highs_m += ce_m;
      @(negedge clk);
    end
    checks += 2;
    if (highs_a != 20) failures++;   // 10 periods x 2
    if (highs_m != 50) failures++;   // 10 periods x 5
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
