// tb_vrc_constraint_check - constraint checker against the reference rules: legal
// chromosomes pass; single injected violations of each rule are caught and named.
module tb_vrc_constraint_check;
  import tb_ref_pkg::*;
  logic [NG-1:0][GW-1:0] genes;
  logic [NLE-1:0] same_in;
  logic same_out, bad_src, ok;
  chrom_t ch;
  int checks = 0, failures = 0;

  vrc_constraint_check dut (.genes, .same_in, .same_out, .bad_src, .ok);

  task automatic expect_(bit e_ok, bit e_out, bit e_src, int e_in, string what);
    for (int g = 0; g < NG; g++) genes[g] = ch[g];
    #1;
    checks++;
    if (ok !== e_ok || same_out !== e_out || bad_src !== e_src ||
        (e_in >= 0 && same_in !== (NLE'(1) << e_in)) || (e_in < 0 && same_in !== '0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s ok=%b same_out=%b bad_src=%b same_in=%h",
                                  what, ok, same_out, bad_src, same_in);
    end
  endtask

  initial begin
    conv_mult(ch);
    expect_(1, 0, 0, -1, "multiplier");
    for (int i = 0; i < 300; i++) begin
      int e, k, j;
      rand_legal(ch);
      expect_(1, 0, 0, -1, "legal");
      // rule 1: identical LE inputs
      e = $urandom_range(NLE - 1);
      ch[3*e+1] = ch[3*e];
      expect_(0, 0, 0, e, "same inputs");
      rand_legal(ch);
      // rule 4: two outputs on one LE
      k = $urandom_range(NO - 1);
      j = (k + 1 + $urandom_range(NO - 2)) % NO;
      ch[3*NLE+j] = ch[3*NLE+k];
      expect_(0, 1, 0, -1, "same outputs");
      rand_legal(ch);
      // rules 5/6: a source from the same or a later column, or beyond the inputs
      e = $urandom_range(NLE - 1);
      ch[3*e] = gene_t'($urandom_range(n_legal(e), 31));
      if (ch[3*e] == ch[3*e+1]) ch[3*e+1] = (ch[3*e+1] == 0) ? 1 : 0;
      expect_(0, 0, 1, -1, "illegal source");
      rand_legal(ch);
      k = $urandom_range(NO - 1);
      ch[3*NLE+k] = gene_t'($urandom_range(NLE, 31));
      expect_(0, 0, 1, -1, "illegal output");
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
