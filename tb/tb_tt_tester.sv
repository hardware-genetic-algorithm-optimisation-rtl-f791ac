// tb_tt_tester - truth-table tester: a random phenotype table stands in for the VRC
// (looked up combinationally from the tester's input vector); every count must match
// the reference model, and done must come 2**NI + 1 cycles after start.
module tb_tt_tester;
  import tb_ref_pkg::*;
  localparam int CW = 7;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NV-1:0][NO-1:0] target;
  logic [NI-1:0] vec_in;
  logic [NO-1:0] vrc_out;
  logic busy, done;
  logic [CW-1:0] vec_ok, elem_ok;
  logic [NO-1:0] cp_ok;
  logic [NO-1:0][CW-1:0] t_ok, f_ok, n_t, n_f;
  table_t got, want;
  int checks = 0, failures = 0;

  tt_tester dut (.clk, .rst_n, .start, .target, .vec_in, .vrc_out, .busy, .done,
                 .vec_ok, .elem_ok, .cp_ok, .t_ok, .f_ok, .n_t, .n_f);

  always #5 clk = ~clk;
  assign vrc_out = got[vec_in];

  task automatic chk(int a, int e, string what);
    checks++;
    if (a != e) begin
      failures++;
      if (failures < 12) $display("FAIL %s = %0d, exp %0d", what, a, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 200; trial++) begin
      fit_t r;
      int cyc;
      mult_table(want);
      // random targets half of the time (including all-zero columns)
      if (trial % 2) for (int v = 0; v < NV; v++) want[v] = NO'($urandom) & NO'(trial >> 2);
      // phenotype = target with a few flipped bits, or entirely random
      for (int v = 0; v < NV; v++)
        got[v] = (trial % 3 == 0) ? NO'($urandom) :
                 want[v] ^ (($urandom_range(5) == 0) ? NO'(1 << $urandom_range(NO - 1)) : '0);
      for (int v = 0; v < NV; v++) target[v] = want[v];
      r = fitness(got, want);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc, NV + 1, "latency");
      chk(int'(vec_ok), r.vec_ok, "vec_ok");
      chk(int'(elem_ok), r.elem_ok, "elem_ok");
      chk($countones(cp_ok), r.ncp, "cp count");
      for (int k = 0; k < NO; k++) begin
        chk(int'(t_ok[k]), r.t_ok[k], "t_ok");
        chk(int'(f_ok[k]), r.f_ok[k], "f_ok");
        chk(int'(n_t[k]), r.n_t[k], "n_t");
        chk(int'(n_f[k]), r.n_f[k], "n_f");
        chk(int'(cp_ok[k]), int'(r.t_ok[k] == r.n_t[k] && r.f_ok[k] == r.n_f[k]), "cp_ok");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
