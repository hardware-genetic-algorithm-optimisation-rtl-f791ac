// tb_evo_platform - evaluation platform end to end: chromosomes are downloaded gene by
// gene, evaluated against the 2 x 2-bit multiplier truth table (and random targets), and
// every fitness output is compared with the reference model applied to the reference
// phenotype. Checks the conventional multiplier scores 100 %, that constraint
// violations are flagged, that the evolved circuit serves ext_in/ext_out outside an
// evaluation, and the evaluation latency.
module tb_evo_platform;
  import tb_ref_pkg::*;
  localparam int FW = 17;
  logic clk = 0, rst_n = 0, cfg_we = 0, eval_start = 0;
  logic [5:0] cfg_waddr = '0, cfg_raddr = '0;
  logic [GW-1:0] cfg_wdata = '0, cfg_rdata;
  logic [NV-1:0][NO-1:0] target;
  logic eval_busy, eval_done, chrom_ok;
  logic [FW-1:0] f_overall, f_elem, f_cp, f_partial, f_ov;
  logic [NO-1:0] cp_ok, ext_out;
  logic [NI-1:0] ext_in = '0;
  chrom_t ch;
  table_t want, got;
  int checks = 0, failures = 0, max_cyc = 0;

  evo_platform dut (.clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
                    .target, .eval_start, .eval_busy, .eval_done, .chrom_ok,
                    .f_overall, .f_elem, .f_cp, .f_partial, .f_ov, .cp_ok, .ext_in, .ext_out);

  always #5 clk = ~clk;

  task automatic chk(int a, int e, string what);
    checks++;
    if (a != e) begin
      failures++;
      if (failures < 12) $display("FAIL %s = %0d, exp %0d", what, a, e);
    end
  endtask

  task automatic download();
    for (int g = 0; g < NG; g++) begin
      @(negedge clk); cfg_we = 1; cfg_waddr = 6'(g); cfg_wdata = ch[g];
    end
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic evaluate(bit exp_ok);
    fit_t r;
    int cyc;
    for (int v = 0; v < NV; v++) begin target[v] = want[v]; got[v] = eval(ch, NI'(v)); end
    r = fitness(got, want);
    @(negedge clk); eval_start = 1;
    @(negedge clk); eval_start = 0;
    cyc = 1;
    while (!eval_done) begin @(negedge clk); cyc++; end
    if (cyc > max_cyc) max_cyc = cyc;
    chk(int'(chrom_ok), int'(exp_ok), "chrom_ok");
    chk(int'(f_overall), r.f_overall, "f_overall");
    chk(int'(f_elem), r.f_elem, "f_elem");
    chk(int'(f_cp), r.f_cp, "f_cp");
    chk(int'(f_partial), r.f_partial, "f_partial");
    chk(int'(f_ov), r.f_ov, "f_ov");
    chk($countones(cp_ok), r.ncp, "cp_ok");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    mult_table(want);
    conv_mult(ch);
    download();
    evaluate(1);
    chk(int'(f_overall), ONE, "multiplier overall 100 %");
    chk(int'(cp_ok), 4'hf, "all four critical paths");
    // use of the circuit outside an evaluation; read-back of the download
    for (int v = 0; v < NV; v++) begin
      ext_in = NI'(v); cfg_raddr = 6'($urandom_range(NG - 1)); #1;
      chk(int'(ext_out), int'(want[v]), "product on ext_out");
      chk(int'(cfg_rdata), int'(ch[cfg_raddr]), "read-back");
    end
    // rule violation: both inputs of LE 0 on the same source
    ch[1] = ch[0];
    download();
    evaluate(0);
    for (int trial = 0; trial < 150; trial++) begin
      rand_legal(ch);
      if (trial % 4 == 3) for (int v = 0; v < NV; v++) want[v] = NO'($urandom);
      else mult_table(want);
      download();
      evaluate(1);
    end
    chk(int'(max_cyc <= 462), 1, "evaluation latency");
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
