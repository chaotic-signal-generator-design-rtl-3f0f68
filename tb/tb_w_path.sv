// tb_w_path: random states and constants; each iteration is run with the
// schedule's enables; Kw is compared with the reference model at phase 10 and
// w_next at phase 26 and at the end of the iteration.
module tb_w_path;
  import chaos_pkg::*;
  import tb_chaos_ref_pkg::*;
  logic clk = 0, reset = 1, run = 0;
  op_en_t en;
  fix_t u = '0, w = '0, b = '0, c = '0, h = '0, w_next, kw;
  int checks = 0, failures = 0, cycles = 0;

  `include "tb_path_sched.svh"

  w_path dut (.clk(clk), .reset(reset), .en(en), .u(u), .w(w), .b(b), .c(c), .h(h),
              .w_next(w_next), .kw(kw));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int it = 0; it < 300; it++) begin
      fix_t exp_w, exp_k;
      u = to_fix(($urandom_range(0, 24000) - 12000) / 1000.0);
      w = to_fix($urandom_range(10, 8000) / 1000.0);
      b = to_fix($urandom_range(1000, 6000) / 1000.0);
      c = to_fix($urandom_range(0, 500) / 1000.0);
      h = fix_t'(1 << $urandom_range(7, 10));
      exp_k = r_kw(u, w, b, c, h);
      exp_w = r_w_next(u, w, b, c, h);
      run = 1;
      while (ph != 10) @(negedge clk);
      checks++;
      if (kw != exp_k) begin
        failures++;
        $display("FAIL it=%0d kw=%0d expected %0d", it, kw, exp_k);
      end
      while (ph != 26) @(negedge clk);
      checks++;
      if (w_next != exp_w) begin
        failures++;
        $display("FAIL it=%0d w_next=%0d expected %0d", it, w_next, exp_w);
      end
      while (ph != 39) @(negedge clk);
      checks++;
      if (w_next != exp_w) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
