// tb_vrc - the complete VRC: a chromosome downloaded gene by gene through the
// configuration port must configure the array, checked on all input vectors. Loads the
// conventional multiplier, then random legal chromosomes.
module tb_vrc;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [5:0] cfg_waddr = '0, cfg_raddr = '0;
  logic [GW-1:0] cfg_wdata = '0, cfg_rdata;
  logic [NI-1:0] ext_in = '0;
  logic [NO-1:0] ext_out;
  logic [NG-1:0][GW-1:0] genes;
  logic route_err;
  chrom_t ch;
  int checks = 0, failures = 0;

  vrc dut (.clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
           .ext_in, .ext_out, .genes, .route_err);

  always #5 clk = ~clk;

  task automatic download();
    for (int g = 0; g < NG; g++) begin
      @(negedge clk);
      cfg_we = 1; cfg_waddr = 6'(g); cfg_wdata = ch[g];
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic check_vectors(string what);
    for (int v = 0; v < NV; v++) begin
      ext_in = NI'(v); #1;
      checks++;
      if (ext_out !== eval(ch, NI'(v))) begin
        failures++;
        if (failures < 10) $display("FAIL %s v=%0d out=%b exp=%b", what, v, ext_out, eval(ch, NI'(v)));
      end
    end
    checks++;
    if (route_err !== 1'b0) begin failures++; $display("FAIL %s route_err", what); end
  endtask

  initial begin
    table_t want;
    repeat (2) @(posedge clk);
    rst_n = 1;
    conv_mult(ch);
    mult_table(want);
    download();
    for (int v = 0; v < NV; v++) begin
      ext_in = NI'(v); #1;
      checks++;
      if (ext_out !== want[v]) begin
        failures++;
        $display("FAIL product %0d x %0d = %0d, exp %0d", v & 3, v >> 2, ext_out, want[v]);
      end
    end
    for (int i = 0; i < 50; i++) begin
      rand_legal(ch);
      download();
      check_vectors("random");
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
