// tb_ehw_top - whole system, end to end, with a 5-clock second for the plant timers.
//
// A behavioural host plays the part of the PC running the genetic algorithm:
//   1. downloads the conventional 2 x 2-bit multiplier and checks it scores 100 %;
//   2. runs a 1 + lambda GA (one parent, lambda = 5 offspring, i.e. a six-individual
//      population) on the multiplier truth table for GENS generations: offspring are the
//      parent with 1 to 3 genes mutated, kept within the evolution constraints; the best
//      offspring replaces the parent when at least as fit. Every hardware fitness is
//      compared with the reference model, and the parent's fitness may never fall;
//   3. checks a chromosome breaking a constraint is flagged and a target with an empty
//      output column is scored;
//   4. loads the glue-plant logic into the tank controller and runs it through MIXING,
//      HOLDING with two pump cycles, and back to MIXING.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_ehw_top;
  import tb_ref_pkg::*;
  localparam int T = 5, LAMBDA = 5, GENS = 150, FW = 17;
  logic clk = 0, rst_n = 0, cfg_we = 0, eval_start = 0;
  logic [1:0] cfg_dest = '0;
  logic [5:0] cfg_waddr = '0, cfg_raddr = '0;
  logic [GW-1:0] cfg_wdata = '0, cfg_rdata;
  logic [NV-1:0][NO-1:0] target;
  logic eval_busy, eval_done, chrom_ok;
  logic [FW-1:0] f_overall, f_elem, f_cp, f_partial, f_ov;
  logic [NO-1:0] cp_ok, ext_out;
  logic [NI-1:0] ext_in = '0;
  logic [3:0] sense_mix = '0;
  logic [1:0] sense_hold = 2'b01;
  logic mix_done = 0, hold_done = 0;
  logic tank_state, pump1, heater1, v_outlet1, v_inlet1, heater2, t_l_o2, t_s_o2, v_outlet2;
  logic t_long_expired, t_short_expired, tank_chrom_err;
  table_t want;
  int checks = 0, failures = 0;
  int n_eval = 0, n_perfect = 0, n_improve = 0, n_violation = 0, n_empty_col = 0,
      n_readback = 0, n_to_hold = 0, n_to_mix = 0, n_long = 0, n_short = 0, n_pump = 0;

  ehw_top #(.TICKS(T)) dut (
    .clk, .rst_n, .cfg_dest, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
    .target, .eval_start, .eval_busy, .eval_done, .chrom_ok,
    .f_overall, .f_elem, .f_cp, .f_partial, .f_ov, .cp_ok, .ext_in, .ext_out,
    .sense_mix, .sense_hold, .mix_done, .hold_done, .tank_state,
    .pump1, .heater1, .v_outlet1, .v_inlet1, .heater2, .t_l_o2, .t_s_o2, .v_outlet2,
    .t_long_expired, .t_short_expired, .tank_chrom_err);

  always #5 clk = ~clk;

  task automatic chk(int a, int e, string what);
    checks++;
    if (a != e) begin
      failures++;
      if (failures < 12) $display("FAIL %s = %0d, exp %0d", what, a, e);
    end
  endtask

  task automatic download(logic [1:0] dest, const ref chrom_t ch);
    for (int g = 0; g < NG; g++) begin
      @(negedge clk); cfg_dest = dest; cfg_we = 1; cfg_waddr = 6'(g); cfg_wdata = ch[g];
    end
    @(negedge clk); cfg_we = 0;
    if (dest == 0) begin
      cfg_raddr = 6'($urandom_range(NG - 1)); #1;
      chk(int'(cfg_rdata), int'(ch[cfg_raddr]), "gene read-back");
      n_readback++;
    end
  endtask

  // download, evaluate on the hardware, compare with the model; returns the fitness
  task automatic evaluate(const ref chrom_t ch, output int fit);
    fit_t r;
    table_t got;
    download(0, ch);
    for (int v = 0; v < NV; v++) begin target[v] = want[v]; got[v] = eval(ch, NI'(v)); end
    r = fitness(got, want);
    @(negedge clk); eval_start = 1;
    @(negedge clk); eval_start = 0;
    while (!eval_done) @(negedge clk);
    n_eval++;
    chk(int'(f_overall), r.f_overall, "f_overall");
    chk(int'(f_partial), r.f_partial, "f_partial");
    chk(int'(chrom_ok), int'(legal(ch)), "chrom_ok");
    if (!chrom_ok) n_violation++;
    if (f_overall == FW'(ONE)) n_perfect++;
    for (int k = 0; k < NO; k++) if (r.n_t[k] == 0 || r.n_f[k] == 0) begin n_empty_col++; break; end
    fit = int'(f_overall);
  endtask

  task automatic mutate(ref chrom_t ch);
    chrom_t c;
    do begin
      c = ch;
      for (int m = 0; m <= $urandom_range(2); m++) begin
        int g;
        g = $urandom_range(NG - 1);
        c[g] = rand_gene(g);
      end
    end while (!legal(c));
    ch = c;
  endtask

  initial begin
    chrom_t parent, child, best, bad, hold;
    int pfit, cfit, bfit, start_fit;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mult_table(want);

    // 1. conventional multiplier
    conv_mult(parent);
    evaluate(parent, pfit);
    chk(pfit, ONE, "conventional multiplier fitness");

    // 2. 1 + lambda evolution from a random parent
    rand_legal(parent);
    evaluate(parent, pfit);
    start_fit = pfit;
    for (int gen = 0; gen < GENS && pfit < ONE; gen++) begin
      bfit = -1;
      for (int i = 0; i < LAMBDA; i++) begin
        child = parent;
        mutate(child);
        evaluate(child, cfit);
        if (cfit > bfit) begin bfit = cfit; best = child; end
      end
      if (bfit >= pfit) begin
        if (bfit > pfit) n_improve++;
        chk(int'(bfit >= pfit), 1, "parent fitness never falls");
        parent = best; pfit = bfit;
      end
    end
    $display("1+lambda GA: parent fitness %0d -> %0d (of %0d) after %0d evaluations",
             start_fit, pfit, ONE, n_eval);

    // 3. constraint violation and an empty target column
    bad = parent; bad[3*NLE+1] = bad[3*NLE+0];
    evaluate(bad, cfit);
    for (int v = 0; v < NV; v++) want[v][3] = 1'b0;
    evaluate(parent, cfit);
    mult_table(want);

    // 4. glue plant: MIXING logic = evolved parent, HOLDING logic = pump-cycle circuit
    for (int e = 0; e < NLE; e++) begin hold[3*e] = 0; hold[3*e+1] = 1; hold[3*e+2] = 0; end
    hold[0] = 3; hold[1] = 0; hold[2]  = 2;
    hold[3] = 2; hold[4] = 0; hold[5]  = 2;
    hold[6] = 2; hold[7] = 0; hold[8]  = 7;
    hold[9] = 0; hold[10] = 1; hold[11] = 2;
    hold[3*NLE+0] = 3; hold[3*NLE+1] = 0; hold[3*NLE+2] = 2; hold[3*NLE+3] = 1;
    download(1, parent);
    download(2, hold);
    chk(int'(tank_chrom_err), 0, "tank chromosomes legal");
    for (int v = 0; v < 16; v++) begin
      sense_mix = 4'(v); #1;
      chk(int'({v_inlet1, v_outlet1, heater1, pump1}), int'(eval(parent, 4'(v))), "MIXING logic");
    end
    @(negedge clk); mix_done = 1; @(negedge clk); mix_done = 0;
    if (tank_state) n_to_hold++;
    begin
      logic prev_pump, prev_l, prev_s;
      prev_pump = v_outlet2; prev_l = 0; prev_s = 0;
      for (int c = 0; c < 35 * T; c++) begin
        @(negedge clk);
        if (v_outlet2 && !prev_pump) n_pump++;
        if (t_long_expired && !prev_l) n_long++;
        if (t_short_expired && !prev_s) n_short++;
        prev_pump = v_outlet2; prev_l = t_long_expired; prev_s = t_short_expired;
        chk(int'({v_inlet1, v_outlet1, heater1, pump1}), 0, "MIXING outputs idle in HOLDING");
      end
    end
    @(negedge clk); hold_done = 1; @(negedge clk); hold_done = 0;
    if (!tank_state) n_to_mix++;

    $display("evaluations %0d, perfect %0d, improvements %0d, violations %0d, empty columns %0d",
             n_eval, n_perfect, n_improve, n_violation, n_empty_col);
    $display("read-backs %0d, to HOLDING %0d, to MIXING %0d, long expiries %0d, short expiries %0d, pump restarts %0d",
             n_readback, n_to_hold, n_to_mix, n_long, n_short, n_pump);
    chk(int'(n_perfect > 0), 1, "perfect phenotype seen");
    chk(int'(n_improve > 0), 1, "GA improved its parent");
    chk(int'(n_violation > 0), 1, "constraint violation flagged");
    chk(int'(n_empty_col > 0), 1, "empty target column scored");
    chk(int'(n_readback > 0), 1, "read-back");
    chk(int'(n_to_hold > 0), 1, "MIXING to HOLDING");
    chk(int'(n_to_mix > 0), 1, "HOLDING to MIXING");
    chk(int'(n_long > 1), 1, "long timer expiries");
    chk(int'(n_short > 1), 1, "short timer expiries");
    chk(int'(n_pump > 1), 1, "pump restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
