// tb_sequencer: runs the sequencer for several iterations and checks
//  - a few enable windows written out by hand (first adder of u at cycles 0-1,
//    last multiplier of v at 20-24, the state load at 26-27 of each 40),
//  - every operator's enable: high exactly in a window of 2 (adder) or 5
//    (multiplier) cycles once per 40-cycle iteration, starting at its phase,
//  - that every operator starts only after the operators whose results it
//    reads are done (adder 1 cycle, multiplier 4, log calculation 5),
//  - the frame output.
module tb_sequencer;
  import chaos_pkg::*;
  logic clk = 0, reset = 1;
  op_en_t en;
  logic [FRAME_BITS-1:0] frame;
  int checks = 0, failures = 0, cycles = 0;
  int high_cnt [N_OPS];

  sequencer dut (.clk(clk), .reset(reset), .en(en), .frame(frame));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Producer -> consumer pairs of the datapaths, and the producer's delay.
  typedef struct { op_e prod; op_e cons; int lat; } dep_t;
  dep_t deps [$];

  function automatic int ready(op_e o);
    if (o == OP_LOG_MUL) return OP_PHASE[o] + 4;
    return OP_PHASE[o] + (OP_IS_MUL[o] ? 4 : 1);
  endfunction

  initial begin
    deps = '{
      '{OP_U_M1, OP_U_A2, 4}, '{OP_U_A1, OP_U_M2, 1}, '{OP_U_A2, OP_U_M2, 1}, '{OP_U_M2, OP_U_A3, 4},
      '{OP_LOG_LUT, OP_LOG_MUL, 1}, '{OP_V_M1, OP_V_A1, 4}, '{OP_V_A1, OP_V_A2, 1}, '{OP_LOG_MUL, OP_V_A2, 4},
      '{OP_V_A2, OP_V_M2, 1}, '{OP_V_M2, OP_V_A3, 4}, '{OP_V_M2, OP_V_A4, 4}, '{OP_V_A4, OP_V_M3, 1},
      '{OP_V_A3, OP_V_A5, 1}, '{OP_V_M3, OP_V_A5, 4}, '{OP_V_A5, OP_V_M4, 1}, '{OP_V_M4, OP_V_A6, 4},
      '{OP_V_M2, OP_V_A6, 4}, '{OP_V_A6, OP_V_A7, 1},
      '{OP_W_A1, OP_W_M1, 1}, '{OP_W_M1, OP_W_A2, 4}, '{OP_W_A2, OP_W_M2, 1}, '{OP_W_M2, OP_W_A3, 4},
      '{OP_W_M2, OP_W_A4, 4}, '{OP_W_A4, OP_W_A5, 1}, '{OP_W_A3, OP_W_M3, 1}, '{OP_W_A5, OP_W_M3, 1},
      '{OP_W_M3, OP_W_A6, 4}, '{OP_W_A6, OP_W_M4, 1}, '{OP_W_M4, OP_W_A7, 4}, '{OP_W_A7, OP_W_A8, 1},
      '{OP_U_A3, OP_LOAD, 1}, '{OP_V_A7, OP_LOAD, 1}, '{OP_W_A8, OP_LOAD, 1}
    };
    foreach (deps[i])
      check($sformatf("dependency %s -> %s", deps[i].prod.name(), deps[i].cons.name()),
            OP_PHASE[deps[i].cons] >= OP_PHASE[deps[i].prod] + deps[i].lat);
    // The state is loaded after every other operator is done.
    for (int o = 0; o < N_OPS; o++)
      if (op_e'(o) != OP_LOAD) check("load last", OP_PHASE[OP_LOAD] >= ready(op_e'(o)));
    check("load window inside the iteration", OP_PHASE[OP_LOAD] + 2 <= 40);
  end

  initial begin
    foreach (high_cnt[i]) high_cnt[i] = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 5 * 40; t++) begin
      int ph;
      ph = t % 40;
      check($sformatf("u_a1 t=%0d", t), en[OP_U_A1] == (ph == 0 || ph == 1));
      check($sformatf("v_m4 t=%0d", t), en[OP_V_M4] == (ph >= 20 && ph <= 24));
      check($sformatf("load t=%0d", t), en[OP_LOAD] == (ph == 26 || ph == 27));
      check($sformatf("frame t=%0d", t), frame == FRAME_BITS'(ph / 20));
      for (int o = 0; o < N_OPS; o++) begin
        int wd;
        op_e oe;
        oe = op_e'(o);
        wd = OP_IS_MUL[o] ? 5 : 2;
        check($sformatf("%s t=%0d", oe.name(), t),
              en[o] == (ph >= int'(OP_PHASE[o]) && ph < int'(OP_PHASE[o]) + wd));
        high_cnt[o] += int'(en[o]);
      end
      @(negedge clk);
    end
    for (int o = 0; o < N_OPS; o++)
      check("cycles per iteration", high_cnt[o] == 5 * (OP_IS_MUL[o] ? 5 : 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
