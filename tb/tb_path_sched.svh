// Shared by the datapath testbenches: a phase counter over one 40-cycle iteration
// and operator enables built directly from the schedule table, independent of the
// sequencer. Expects clk, run and en in the including module.
int ph = 0;
always @(posedge clk) if (run) ph <= (ph == int'(chaos_pkg::ITER_CYCLES) - 1) ? 0 : ph + 1;
always_comb begin
  for (int o = 0; o < chaos_pkg::N_OPS; o++)
    en[o] = run && ph >= int'(chaos_pkg::OP_PHASE[o]) &&
            ph < int'(chaos_pkg::OP_PHASE[o]) + (chaos_pkg::OP_IS_MUL[o] ? 5 : 2);
end
