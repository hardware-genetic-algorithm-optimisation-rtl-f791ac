// tb_fitness_calc - fitness arithmetic: counts from random phenotype/target pairs are
// fed straight in; every fitness output must equal the reference model. Also checks the
// worked examples of the fitness function: all C3 elements wrong gives F_Elements 75 %
// and F_OV 0 %; a constant-0 C3 scores 50 % on its partial CP fitness; C0 with 3 of 4
// true and 10 of 12 false bits right scores 79.2 % on its partial CP fitness; a perfect
// phenotype scores 100 % overall.
module tb_fitness_calc;
  import tb_ref_pkg::*;
  localparam int CW = 7, FW = 17;
  logic clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] vec_ok, elem_ok;
  logic [NO-1:0] cp_ok;
  logic [NO-1:0][CW-1:0] t_ok, f_ok, n_t, n_f;
  logic busy, done;
  logic [FW-1:0] f_elem, f_cp, f_partial, f_overall, f_ov;
  table_t got, want;
  int checks = 0, failures = 0, max_cyc = 0;

  fitness_calc dut (.clk, .rst_n, .start, .vec_ok, .elem_ok, .cp_ok, .t_ok, .f_ok,
                    .n_t, .n_f, .busy, .done, .f_elem, .f_cp, .f_partial, .f_overall, .f_ov);

  always #5 clk = ~clk;

  task automatic chk(int a, int e, string what);
    checks++;
    if (a != e) begin
      failures++;
      if (failures < 12) $display("FAIL %s = %0d, exp %0d", what, a, e);
    end
  endtask

  task automatic run(output fit_t r);
    int cyc;
    r = fitness(got, want);
    vec_ok = CW'(r.vec_ok); elem_ok = CW'(r.elem_ok);
    for (int k = 0; k < NO; k++) begin
      t_ok[k] = CW'(r.t_ok[k]); f_ok[k] = CW'(r.f_ok[k]);
      n_t[k] = CW'(r.n_t[k]);   n_f[k] = CW'(r.n_f[k]);
      cp_ok[k] = (r.t_ok[k] == r.n_t[k] && r.f_ok[k] == r.n_f[k]);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (cyc > max_cyc) max_cyc = cyc;
    chk(int'(f_elem), r.f_elem, "f_elem");
    chk(int'(f_cp), r.f_cp, "f_cp");
    chk(int'(f_ov), r.f_ov, "f_ov");
    chk(int'(f_partial), r.f_partial, "f_partial");
    chk(int'(f_overall), r.f_overall, "f_overall");
  endtask

  initial begin
    fit_t r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mult_table(want);
    // perfect phenotype
    got = want;
    run(r);
    chk(int'(f_overall), ONE, "perfect overall");
    // every C3 element wrong: 48 of 64 elements, no correct output vector
    for (int v = 0; v < NV; v++) got[v] = want[v] ^ 4'b1000;
    run(r);
    chk(int'(f_elem), ONE * 3 / 4, "C3 inverted F_Elements");
    chk(int'(f_ov), 0, "C3 inverted F_OV");
    chk(int'(f_cp), ONE * 3 / 4, "C3 inverted F_CP");
    // C3 stuck at 0: its partial CP score is 0.5*(0/1) + 0.5*(15/15) = 50 %
    for (int v = 0; v < NV; v++) got[v] = want[v] & 4'b0111;
    run(r);
    chk(int'(f_partial), (3 * ONE + ONE / 2) / 4, "logic-low C3 F_CP,Partial");
    // C0 with 3 of its 4 true bits and 10 of its 12 false bits right, all else correct:
    // its partial CP score is 0.5*(3/4) + 0.5*(10/12) = 79.2 %
    got = want;
    got[5][0] = 1'b0;                 // a true bit of C0 (1 x 1) lost
    got[0][0] = 1'b1; got[2][0] = 1'b1; // two false bits of C0 set
    run(r);
    chk(int'((4 * int'(f_partial) - 3 * ONE) * 1000 / ONE), 791, "C0 partial CP 79.2 %");
    // random phenotypes and targets
    for (int trial = 0; trial < 300; trial++) begin
      if (trial % 2) for (int v = 0; v < NV; v++) want[v] = NO'($urandom) & NO'($urandom);
      else mult_table(want);
      for (int v = 0; v < NV; v++)
        got[v] = (trial % 3 == 0) ? NO'($urandom) :
                 want[v] ^ (($urandom_range(4) == 0) ? NO'(1 << $urandom_range(NO - 1)) : '0);
      run(r);
    end
    // latency: 2*NO + 5 division steps of 34 cycles at most
    chk(int'(max_cyc <= (2 * NO + 5) * 34 + 4), 1, "latency bound");
    $display("longest evaluation: %0d cycles", max_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
