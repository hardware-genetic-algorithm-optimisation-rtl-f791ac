// tb_vrc_source_mux - random test of one routing switch: the selected candidate for a
// legal gene, constant 0 and the illegal flag for a gene beyond the legal range.
module tb_vrc_source_mux;
  logic [19:0] src;
  logic [4:0]  sel;
  logic [5:0]  n_legal;
  logic        y, illegal;
  int checks = 0, failures = 0;

  vrc_source_mux #(.N_SRC(20), .SEL_W(5)) dut (.src, .sel, .n_legal, .y, .illegal);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic exp_y, exp_il;
      src = 20'($urandom); sel = 5'($urandom); n_legal = 6'($urandom_range(1, 20));
      #1;
      exp_il = (int'(sel) >= int'(n_legal));
      exp_y  = exp_il ? 1'b0 : src[sel];
      checks++;
      if (y !== exp_y || illegal !== exp_il) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d n_legal=%0d y=%b/%b il=%b/%b",
                                    sel, n_legal, y, exp_y, illegal, exp_il);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
