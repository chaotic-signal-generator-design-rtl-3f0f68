// tb_u_path: random states and step lengths; each iteration is run with the
// schedule's enables and u_next is compared with the reference model at phase 10
// (when it must have appeared) and at the end of the iteration.
module tb_u_path;
  import chaos_pkg::*;
  import tb_chaos_ref_pkg::*;
  logic clk = 0, reset = 1, run = 0;
  op_en_t en;
  fix_t u = '0, v = '0, w = '0, h = '0, u_next;
  int checks = 0, failures = 0, cycles = 0;

  `include "tb_path_sched.svh"

  u_path dut (.clk(clk), .reset(reset), .en(en), .u(u), .v(v), .w(w), .h(h), .u_next(u_next));

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
      fix_t exp_u;
      u = to_fix(($urandom_range(0, 24000) - 12000) / 1000.0);
      v = to_fix(($urandom_range(0, 24000) - 12000) / 1000.0);
      w = to_fix($urandom_range(10, 30000) / 1000.0);
      h = fix_t'(1 << $urandom_range(7, 10));       // 1/32 .. 1/4
      exp_u = r_u_next(u, v, w, h);
      run = 1;
      while (ph != 10) @(negedge clk);
      checks++;
      if (u_next != exp_u) begin
        failures++;
        $display("FAIL it=%0d phase 10 u_next=%0d expected %0d", it, u_next, exp_u);
      end
      while (ph != 39) @(negedge clk);
      checks++;
      if (u_next != exp_u) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
