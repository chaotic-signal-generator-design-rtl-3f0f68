// tb_log_calc: drives the log calculation module with the generator's enable
// pattern (table register 2 cycles, multiplier 5 cycles starting one cycle
// later) and checks term against 0.1*u*ln(w) in floating point, within the
// table's error scaled by |u| plus the final truncation. Checks that term is
// ready 5 cycles after the table enable and holds afterwards.
module tb_log_calc;
  import chaos_pkg::*;
  import tb_chaos_ref_pkg::*;
  logic clk = 0, reset = 1, ce_lut = 0, ce_mul = 0;
  fix_t u = '0, w = '0, term;
  int checks = 0, failures = 0, cycles = 0;

  log_calc dut (.clk(clk), .reset(reset), .ce_lut(ce_lut), .ce_mul(ce_mul), .u(u), .w(w), .term(term));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(fix_t ua, fix_t wa);
    real ex, tol;
    fix_t held;
    @(negedge clk);
    u = ua; w = wa;
    ce_lut = 1;                          // phase 0
    @(negedge clk) ce_mul = 1;           // phase 1
    @(negedge clk) ce_lut = 0;           // phase 2
    repeat (3) @(negedge clk);           // phase 5: ready
    ex = 0.1 * to_real(ua) * $ln(to_real(wa));
    tol = (6.0 * (to_real(ua) < 0 ? -to_real(ua) : to_real(ua)) + 2.0) / 4096.0;
    checks++;
    if ((to_real(term) - ex) > tol || (ex - to_real(term)) > tol) begin
      failures++;
      $display("FAIL u=%f w=%f term=%f expected %f", to_real(ua), to_real(wa), to_real(term), ex);
    end
    checks++;
    if (term != r_mul(ua, r_ln01(wa))) failures++;
    @(negedge clk) ce_mul = 0;
    held = term;
    u = ~ua; w = ~wa;
    repeat (4) @(negedge clk);
    checks++;
    if (term != held) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    one(to_fix(1.0), to_fix(2.718281828));
    one(to_fix(-3.5), to_fix(0.25));
    one(to_fix(12.0), to_fix(40.0));
    for (int i = 0; i < 300; i++)
      one(to_fix(($urandom_range(0, 30000) - 15000) / 1000.0), fix_t'($urandom_range(40, 250000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
