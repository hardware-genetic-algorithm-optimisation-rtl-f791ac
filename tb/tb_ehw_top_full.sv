// tb_ehw_top_full - the system at its default parameters (20-LE VRCs, 50 MHz clock,
// 10 s / 5 s plant timers). One complete operation of each part: the conventional
// 2 x 2-bit multiplier is downloaded and evaluated (100 % fitness, product on ext_out),
// and the glue plant is taken from MIXING to HOLDING, where the pump must start and keep
// running for the first 20 ms (one million clocks) of its ten-second on phase, then back
// to MIXING. The full 10 s / 5 s pump cycle is checked with a shorter second in
// tb_ehw_top and tb_tank_controller.
module tb_ehw_top_full;
  import tb_ref_pkg::*;
  localparam int FW = 17;
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
  longint cyc = 0;
  int checks = 0, failures = 0;

  ehw_top dut (
    .clk, .rst_n, .cfg_dest, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
    .target, .eval_start, .eval_busy, .eval_done, .chrom_ok,
    .f_overall, .f_elem, .f_cp, .f_partial, .f_ov, .cp_ok, .ext_in, .ext_out,
    .sense_mix, .sense_hold, .mix_done, .hold_done, .tank_state,
    .pump1, .heater1, .v_outlet1, .v_inlet1, .heater2, .t_l_o2, .t_s_o2, .v_outlet2,
    .t_long_expired, .t_short_expired, .tank_chrom_err);

  always #10 clk = ~clk;          // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(longint a, longint e, string what);
    checks++;
    if (a != e) begin
      failures++;
      $display("FAIL %s = %0d, exp %0d", what, a, e);
    end
  endtask

  task automatic download(logic [1:0] dest, const ref chrom_t ch);
    for (int g = 0; g < NG; g++) begin
      @(negedge clk); cfg_dest = dest; cfg_we = 1; cfg_waddr = 6'(g); cfg_wdata = ch[g];
    end
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    chrom_t mult, hold;
    longint t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mult_table(want);
    conv_mult(mult);
    download(0, mult);
    for (int v = 0; v < NV; v++) target[v] = want[v];
    @(negedge clk); eval_start = 1;
    @(negedge clk); eval_start = 0;
    while (!eval_done) @(negedge clk);
    chk(f_overall, ONE, "multiplier fitness");
    chk(chrom_ok, 1, "multiplier chromosome legal");
    for (int v = 0; v < NV; v++) begin
      ext_in = NI'(v); #1;
      chk(ext_out, want[v], "product");
    end
    // glue plant
    for (int e = 0; e < NLE; e++) begin hold[3*e] = 0; hold[3*e+1] = 1; hold[3*e+2] = 0; end
    hold[0] = 3; hold[1] = 0; hold[2]  = 2;
    hold[3] = 2; hold[4] = 0; hold[5]  = 2;
    hold[6] = 2; hold[7] = 0; hold[8]  = 7;
    hold[9] = 0; hold[10] = 1; hold[11] = 2;
    hold[3*NLE+0] = 3; hold[3*NLE+1] = 0; hold[3*NLE+2] = 2; hold[3*NLE+3] = 1;
    download(2, hold);
    download(1, mult);
    @(negedge clk); mix_done = 1; @(negedge clk); mix_done = 0;
    chk(tank_state, 1, "HOLDING");
    t0 = cyc;
    chk(v_outlet2, 1, "pump on");
    chk(t_l_o2, 1, "on timer running");
    repeat (1_000_000) begin
      @(negedge clk);
      if (!v_outlet2 || t_long_expired) break;
    end
    chk(cyc - t0 >= 1_000_000, 1, "pump kept running for 20 ms");
    chk(t_long_expired, 0, "on timer not yet expired");
    @(negedge clk); hold_done = 1; @(negedge clk); hold_done = 0;
    chk(tank_state, 0, "back to MIXING");
    chk(v_outlet2, 0, "pump stopped in MIXING");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
