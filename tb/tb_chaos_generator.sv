// tb_chaos_generator: end-to-end test of the generator at its default sizes.
//
// Run 1: a = 0.2, b = 4, c = 0.2, h = 1/32, start (1, 1, 1), 3000 iterations.
// Run 2: reset again with a new start (-2, 3, 0.5) and a smaller step h = 1/64
// (the step length is changed at run time), 1500 iterations.
// For every iteration it checks
//  - the new u, v, w against the bit-exact reference model (tb_chaos_ref_pkg),
//  - that valid comes in cycle 27 after reset and then every 40 cycles,
//  - that the signals stay inside the range of the chaotic attractor.
// For the first 60 iterations of run 1 it also compares with the same recurrence
// in double precision (within 0.02), which the fixed-point design must follow.
// It counts the mechanisms of the design and fails if one never happened:
// iterations completed, operators firing in the second frame, u changing sign
// (oscillation), w below 1 and above 1 (both halves of the logarithm table),
// a reset restart and a run-time change of h.
module tb_chaos_generator;
  import chaos_pkg::*;
  import tb_chaos_ref_pkg::*;
  logic clk = 0, reset = 1;
  fix_t a, b, c, h, u0, v0, w0;
  fix_t u, v, w;
  logic valid;
  logic [FRAME_BITS-1:0] frame;
  int checks = 0, failures = 0, cycles = 0;
  int n_iter = 0, n_frame1 = 0, n_sign = 0, n_wlo = 0, n_whi = 0, n_restart = 0, n_hchange = 0;

  chaos_generator dut (.clk(clk), .reset(reset), .a(a), .b(b), .c(c), .h(h),
                       .u0(u0), .v0(v0), .w0(w0), .u(u), .v(v), .w(w),
                       .valid(valid), .frame(frame));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) if (!reset && frame == 1 && dut.en[OP_V_M4]) n_frame1++;

  initial begin
    wait (cycles == 250000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(int iters, fix_t ia, fix_t ib, fix_t ic, fix_t ih,
                     fix_t iu, fix_t iv, fix_t iw, bit float_cmp);
    fix_t ru, rv, rw, nu, nv, nw;
    real fu, fv, fw, fa, fb, fc, fh;
    int nc, last_t;
    @(negedge clk);
    reset = 1;
    a = ia; b = ib; c = ic; h = ih; u0 = iu; v0 = iv; w0 = iw;
    repeat (3) @(negedge clk);
    check("reset loads the start", u == iu && v == iv && w == iw && !valid);
    reset = 0;
    nc = 0;                       // this negedge lies in phase 0 of the first iteration
    ru = iu; rv = iv; rw = iw;
    fu = to_real(iu); fv = to_real(iv); fw = to_real(iw);
    fa = to_real(ia); fb = to_real(ib); fc = to_real(ic); fh = to_real(ih);
    last_t = -1;
    for (int k = 0; k < iters; k++) begin
      real kv, kw, fun, fvn, fwn;
      @(negedge clk);
      nc++;
      while (!valid) begin
        @(negedge clk);
        nc++;
      end
      if (k == 0) check($sformatf("first valid in cycle %0d", nc), nc == 27);
      else        check("40 cycles per iteration", nc - last_t == 40);
      last_t = nc;
      nu = r_u_next(ru, rv, rw, ih);
      nv = r_v_next(ru, rv, rw, ia, ih);
      nw = r_w_next(ru, rw, ib, ic, ih);
      check($sformatf("iteration %0d: u=%0d v=%0d w=%0d expected %0d %0d %0d", k, u, v, w, nu, nv, nw),
            u == nu && v == nv && w == nw);
      if ((u < 0) != (ru < 0)) n_sign++;
      ru = u; rv = v; rw = w;
      if (rw < fix_t'(4096)) n_wlo++; else n_whi++;
      check($sformatf("inside the range k=%0d u=%f v=%f w=%f", k, to_real(ru), to_real(rv), to_real(rw)),
            ru > to_fix(-30.0) && ru < to_fix(30.0) && rv > to_fix(-30.0) && rv < to_fix(30.0) &&
            rw > 0 && rw < to_fix(100.0));
      if (float_cmp && k < 60) begin
        kv  = fh / 2 * (fu + fa * fv + 0.1 * fu * $ln(fw));
        kw  = fh / 2 * (fc + fw * (fu - fb));
        fun = fu - (fv + fw) * (fh + fh * fh / 2);
        fvn = fv + kv + fh / 2 * ((kv + fu) + fa * (kv + fv));
        fwn = fw + kw + fh / 2 * (fc + (fw + kw) * (fu + kw - fb));
        fu = fun; fv = fvn; fw = fwn;
        check($sformatf("float k=%0d u=%f/%f v=%f/%f w=%f/%f", k, to_real(u), fu, to_real(v), fv, to_real(w), fw),
              (to_real(u) - fu) < 0.02 && (fu - to_real(u)) < 0.02 &&
              (to_real(v) - fv) < 0.02 && (fv - to_real(v)) < 0.02 &&
              (to_real(w) - fw) < 0.02 && (fw - to_real(w)) < 0.02);
      end
      n_iter++;
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0; h = '0; u0 = '0; v0 = '0; w0 = '0;
    run(3000, to_fix(0.2), to_fix(4.0), to_fix(0.2), to_fix(1.0 / 32), to_fix(1.0), to_fix(1.0), to_fix(1.0), 1);
    $display("run 1 ends at u=%f v=%f w=%f", to_real(u), to_real(v), to_real(w));
    n_restart++;
    n_hchange++;
    run(1500, to_fix(0.2), to_fix(4.0), to_fix(0.2), to_fix(1.0 / 64), to_fix(-2.0), to_fix(3.0), to_fix(0.5), 0);
    $display("run 2 ends at u=%f v=%f w=%f", to_real(u), to_real(v), to_real(w));
    $display("count iterations=%0d second_frame_ops=%0d u_sign_changes=%0d w_below_1=%0d w_above_1=%0d restarts=%0d h_changes=%0d",
             n_iter, n_frame1, n_sign, n_wlo, n_whi, n_restart, n_hchange);
    check("iterations", n_iter == 4500);
    check("second frame used", n_frame1 > 0);
    check("u oscillates", n_sign > 10);
    check("w below 1 seen", n_wlo > 0);
    check("w above 1 seen", n_whi > 0);
    check("restart", n_restart > 0);
    check("h changed", n_hchange > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
