// tb_vrc_config_mem - configuration memory: reset value, gene writes seen on the
// parallel chromosome bus one cycle later, read-back, and holding without a write.
module tb_vrc_config_mem;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [GW-1:0] wdata = '0, rdata;
  logic [NG-1:0][GW-1:0] genes;
  gene_t shadow [NG];
  int checks = 0, failures = 0;

  vrc_config_mem dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .genes);

  always #5 clk = ~clk;

  task automatic check_all(string what);
    for (int g = 0; g < NG; g++) begin
      raddr = 6'(g);
      #1;
      checks++;
      if (genes[g] !== shadow[g] || rdata !== shadow[g]) begin
        failures++;
        if (failures < 10) $display("FAIL %s gene %0d: bus=%0d rd=%0d exp=%0d",
                                    what, g, genes[g], rdata, shadow[g]);
      end
    end
  endtask

  initial begin
    for (int g = 0; g < NG; g++) shadow[g] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all("reset");
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        we = ($urandom_range(3) != 0);
        waddr = 6'($urandom_range(NG - 1));
        wdata = GW'($urandom);
        @(posedge clk); #1;
        if (we) shadow[waddr] = wdata;
        // the written gene is visible right after the edge
        checks++;
        if (genes[waddr] !== shadow[waddr]) begin
          failures++;
          $display("FAIL gene %0d after write: %0d exp %0d", waddr, genes[waddr], shadow[waddr]);
        end
      end
      @(negedge clk); we = 0;
      check_all("round");
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
