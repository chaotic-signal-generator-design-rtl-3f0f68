// tb_v_path: random states and constants; each iteration is run with the
// schedule's enables; Kv is compared with the reference model at phase 10 and
// v_next at phase 26 and at the end of the iteration.
module tb_v_path;
  import chaos_pkg::*;
  import tb_chaos_ref_pkg::*;
  logic clk = 0, reset = 1, run = 0;
  op_en_t en;
  fix_t u = '0, v = '0, w = '0, a = '0, h = '0, v_next, kv;
  int checks = 0, failures = 0, cycles = 0;

  `include "tb_path_sched.svh"

  v_path dut (.clk(clk), .reset(reset), .en(en), .u(u), .v(v), .w(w), .a(a), .h(h),
              .v_next(v_next), .kv(kv));

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
      fix_t exp_v, exp_k;
      u = to_fix(($urandom_range(0, 24000) - 12000) / 1000.0);
      v = to_fix(($urandom_range(0, 24000) - 12000) / 1000.0);
      w = to_fix($urandom_range(10, 30000) / 1000.0);
      a = to_fix($urandom_range(0, 400) / 1000.0);
      h = fix_t'(1 << $urandom_range(7, 10));
      exp_k = r_kv(u, v, w, a, h);
      exp_v = r_v_next(u, v, w, a, h);
      run = 1;
      while (ph != 10) @(negedge clk);
      checks++;
      if (kv != exp_k) begin
        failures++;
        $display("FAIL it=%0d kv=%0d expected %0d", it, kv, exp_k);
      end
      while (ph != 26) @(negedge clk);
      checks++;
      if (v_next != exp_v) begin
        failures++;
        $display("FAIL it=%0d v_next=%0d expected %0d", it, v_next, exp_v);
      end
      while (ph != 39) @(negedge clk);
      checks++;
      if (v_next != exp_v) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
