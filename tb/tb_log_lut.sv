// tb_log_lut: compares the table output with 0.1*ln(w) computed in floating
// point, over every power of two and random positive arguments (tolerance 5 LSB,
// the table's mantissa step plus rounding), and checks the w <= 0 case.
module tb_log_lut;
  import chaos_pkg::*;
  import tb_chaos_ref_pkg::*;
  fix_t w, y;
  int checks = 0, failures = 0;
  int worst = 0;

  log_lut dut (.w(w), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(fix_t wa);
    real ex;
    int err;
    w = wa;
    #1;
    ex = 0.1 * $ln(to_real(wa)) * 4096.0;
    err = r_round(real'(y) - ex);
    if (err < 0) err = -err;
    if (err > worst) worst = err;
    checks++;
    if (err > 5) begin
      failures++;
      $display("FAIL w=%0d y=%0d expected %f", wa, y, ex);
    end
  endtask

  initial begin
    for (int p = 0; p < 19; p++) one(fix_t'(1 << p));
    one(fix_t'(4096));                         // ln 1 = 0
    for (int i = 0; i < 3000; i++) one(fix_t'($urandom_range(1, 524287)));
    for (int i = 0; i < 500; i++) one(fix_t'($urandom_range(1, 200)));
    w = -20'sd5; #1;
    checks++;
    if (y != fix_t'(r_round(0.1 * $ln(1.0 / 4096.0) * 4096.0 + 0.1 * $ln(1.0 + 0.5 / 64.0) * 4096.0))) failures++;
    w = '0; #1;
    checks++;
    if (y != r_ln01(fix_t'(1))) failures++;
    $display("largest error %0d LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
