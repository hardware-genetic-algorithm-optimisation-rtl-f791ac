// tb_vrc_array - the LE array against the reference model: the conventional multiplier,
// then random legal and random unconstrained chromosomes, each on all 16 input vectors.
module tb_vrc_array;
  import tb_ref_pkg::*;
  logic [NI-1:0]         ext_in;
  logic [NG-1:0][GW-1:0] genes;
  logic [NO-1:0]         ext_out;
  logic [NLE-1:0]        le_out;
  logic                  route_err;
  chrom_t ch;
  int checks = 0, failures = 0;

  vrc_array dut (.ext_in, .genes, .ext_out, .le_out, .route_err);

  task automatic apply_all(bit check_err, bit exp_err);
    for (int g = 0; g < NG; g++) genes[g] = ch[g];
    for (int v = 0; v < NV; v++) begin
      ext_in = NI'(v);
      #1;
      checks++;
      if (ext_out !== eval(ch, NI'(v))) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d out=%b exp=%b", v, ext_out, eval(ch, NI'(v)));
      end
    end
    if (check_err) begin
      checks++;
      if (route_err !== exp_err) begin
        failures++;
        $display("FAIL route_err=%b exp=%b", route_err, exp_err);
      end
    end
  endtask

  initial begin
    table_t want;
    mult_table(want);
    conv_mult(ch);
    for (int g = 0; g < NG; g++) genes[g] = ch[g];
    for (int v = 0; v < NV; v++) begin
      ext_in = NI'(v); #1;
      checks++;
      if (ext_out !== want[v]) begin
        failures++;
        $display("FAIL multiplier v=%0d out=%0d exp=%0d", v, ext_out, want[v]);
      end
    end
    for (int i = 0; i < 300; i++) begin
      rand_legal(ch);
      apply_all(1, 0);
    end
    for (int i = 0; i < 300; i++) begin
      bit err;
      err = 0;
      for (int g = 0; g < NG; g++) ch[g] = gene_t'($urandom);
      for (int e = 0; e < NLE; e++)
        if (ch[3*e] >= n_legal(e) || ch[3*e+1] >= n_legal(e)) err = 1;
      for (int k = 0; k < NO; k++) if (ch[3*NLE+k] >= NLE) err = 1;
      apply_all(1, err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
