// tb_ehw_mult_evolution - workload: evolving a 2 x 2-bit multiplier, at the system's
// default parameters, first with the 1 + lambda GA, then with a canonical GA. A behavioural host keeps one parent and makes
// lambda = 5 offspring per generation (a six-individual population) by mutating 1 to 3
// genes within the evolution constraints; every offspring is downloaded and scored by the
// hardware, and the best replaces the parent when at least as fit. The run stops at a
// 100 % phenotype or after 3000 generations, the run limit of the original experiments.
// The canonical GA keeps a population of six with the fittest kept unchanged, and breeds
// five children a generation by binary tournament selection, uniform crossover and the
// same mutation, also for up to 3000 generations.
// Checks: every hardware fitness equals the reference model, the best fitness never
// falls, and each GA improves it at least once.
module tb_ehw_mult_evolution;
  import tb_ref_pkg::*;
  localparam int LAMBDA = 5, GENS = 3000, FW = 17;
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

  ehw_top dut (
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
      if (gen % 250 == 0) $display("generation %0d: parent fitness %0d", gen, pfit);
    end
    $display("1+lambda GA: parent fitness %0d -> %0d (of %0d = 100 %%), %0d evaluations",
             start_fit, pfit, ONE, n_eval);

    chk(int'(n_improve > 0), 1, "1+lambda GA improved its parent");

    // canonical GA: population of six, the fittest kept (elitism), five children per
    // generation from two parents chosen by binary tournament, uniform crossover, then
    // mutation of 1 to 3 genes; children breaking a constraint are made again
    begin
      chrom_t pop [6], nxt [6];
      int fit [6], elite, gen_improve;
      for (int i = 0; i < 6; i++) begin rand_legal(child); evaluate(child, cfit); pop[i] = child; fit[i] = cfit; end
      elite = 0;
      for (int i = 1; i < 6; i++) if (fit[i] > fit[elite]) elite = i;
      start_fit = fit[elite];
      gen_improve = 0;
      for (int gen = 0; gen < GENS && fit[elite] < ONE; gen++) begin
        int nfit [6], prev_best;
        prev_best = fit[elite];
        nxt[0] = pop[elite]; nfit[0] = fit[elite];
        for (int i = 1; i < 6; i++) begin
          int a, b, p1, p2;
          a = $urandom_range(5); b = $urandom_range(5); p1 = (fit[a] >= fit[b]) ? a : b;
          a = $urandom_range(5); b = $urandom_range(5); p2 = (fit[a] >= fit[b]) ? a : b;
          do begin
            for (int g = 0; g < NG; g++) child[g] = $urandom_range(1) ? pop[p1][g] : pop[p2][g];
            mutate(child);
          end while (!legal(child));
          nxt[i] = child;
          evaluate(child, cfit);
          nfit[i] = cfit;
        end
        pop = nxt; fit = nfit;
        elite = 0;
        for (int i = 1; i < 6; i++) if (fit[i] > fit[elite]) elite = i;
        chk(int'(fit[elite] >= prev_best), 1, "elite fitness never falls");
        if (fit[elite] > prev_best) gen_improve++;
        if (gen % 250 == 0) $display("canonical generation %0d: best fitness %0d", gen, fit[elite]);
      end
      $display("canonical GA: best fitness %0d -> %0d (of %0d = 100 %%), %0d evaluations in all",
               start_fit, fit[elite], ONE, n_eval);
      chk(int'(gen_improve > 0), 1, "canonical GA improved its best");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #8000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
