// tb_tank_controller - glue-plant controller with a 5-clock second. The MIXING logic is
// loaded with an arbitrary legal chromosome and checked against the reference VRC model;
// the HOLDING logic is loaded with a hand-made circuit for the pump cycle:
//   t_l_o2 = NOT t_short_expired   (long timer runs unless the short one has expired)
//   t_s_o2 = t_long_expired        (short timer runs once the long one has expired)
//   v_outlet2 = NOT t_long_expired (glue pumped while the long timer runs)
//   heater2 = NOT sense_hold[0]    (heat while the holding tank is below temperature)
// which must give 10 s on / 5 s off. Outputs of the inactive state must stay low.
module tb_tank_controller;
  import tb_ref_pkg::*;
  localparam int T = 5;
  logic clk = 0, rst_n = 0, cfg_sel = 0, cfg_we = 0;
  logic [5:0] cfg_waddr = '0;
  logic [GW-1:0] cfg_wdata = '0;
  logic [3:0] sense_mix = '0;
  logic [1:0] sense_hold = '0;
  logic mix_done = 0, hold_done = 0;
  logic state, pump1, heater1, v_outlet1, v_inlet1, heater2, t_l_o2, t_s_o2, v_outlet2;
  logic t_long_expired, t_short_expired, chrom_err;
  chrom_t mix, hold;
  int checks = 0, failures = 0;

  tank_controller #(.TICKS(T)) dut (
    .clk, .rst_n, .cfg_sel, .cfg_we, .cfg_waddr, .cfg_wdata, .sense_mix, .sense_hold,
    .mix_done, .hold_done, .state, .pump1, .heater1, .v_outlet1, .v_inlet1, .heater2,
    .t_l_o2, .t_s_o2, .v_outlet2, .t_long_expired, .t_short_expired, .chrom_err);

  always #5 clk = ~clk;

  task automatic chk(int a, int e, string what);
    checks++;
    if (a != e) begin
      failures++;
      if (failures < 12) $display("FAIL %s = %0d, exp %0d", what, a, e);
    end
  endtask

  task automatic download(bit sel, const ref chrom_t ch);
    for (int g = 0; g < NG; g++) begin
      @(negedge clk); cfg_sel = sel; cfg_we = 1; cfg_waddr = 6'(g); cfg_wdata = ch[g];
    end
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int on_len, off_len, cycles_seen;
    logic prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rand_legal(mix);
    for (int e = 0; e < NLE; e++) begin hold[3*e] = 0; hold[3*e+1] = 1; hold[3*e+2] = 0; end
    hold[0] = 3; hold[1] = 0; hold[2]  = 2;   // LE0 = NOT in3 (short expired)
    hold[3] = 2; hold[4] = 0; hold[5]  = 2;   // LE1 = NOT in2 (long expired)
    hold[6] = 2; hold[7] = 0; hold[8]  = 7;   // LE2 = in2
    hold[9] = 0; hold[10] = 1; hold[11] = 2;  // LE3 = NOT in0
    hold[3*NLE+0] = 3; hold[3*NLE+1] = 0; hold[3*NLE+2] = 2; hold[3*NLE+3] = 1;
    download(0, mix);
    download(1, hold);
    chk(int'(chrom_err), 0, "chrom_err");
    // MIXING: outputs follow the mixing chromosome, HOLDING outputs low
    chk(int'(state), 0, "reset state");
    for (int v = 0; v < 16; v++) begin
      sense_mix = 4'(v); sense_hold = 2'($urandom); #1;
      chk(int'({v_inlet1, v_outlet1, heater1, pump1}), int'(eval(mix, 4'(v))), "mixing outputs");
      chk(int'({v_outlet2, t_s_o2, t_l_o2, heater2}), 0, "holding outputs idle");
    end
    @(negedge clk); mix_done = 1;
    @(negedge clk); mix_done = 0;
    chk(int'(state), 1, "to HOLDING");
    chk(int'({v_inlet1, v_outlet1, heater1, pump1}), 0, "mixing outputs idle");
    sense_hold = 2'b00; #1;
    chk(int'(heater2), 1, "heater on when cold");
    sense_hold = 2'b01; #1;
    chk(int'(heater2), 0, "heater off when warm");
    // pump cycle: measure three on and off phases after the first
    prev = v_outlet2; on_len = 0; off_len = 0; cycles_seen = 0;
    for (int c = 0; c < 80 * T && cycles_seen < 8; c++) begin
      @(negedge clk);
      if (v_outlet2 != prev) begin
        if (cycles_seen > 0) begin
          if (prev) chk(int'(on_len >= 9 * T && on_len <= 10 * T + 3), 1, "pump on time 10 s");
          else      chk(int'(off_len >= 4 * T && off_len <= 5 * T + 4), 1, "pump off time 5 s");
          if (prev) $display("pump on %0d clocks", on_len); else $display("pump off %0d clocks", off_len);
        end
        cycles_seen++;
        on_len = 0; off_len = 0;
      end
      if (v_outlet2) on_len++; else off_len++;
      prev = v_outlet2;
    end
    chk(int'(cycles_seen >= 6), 1, "pump cycled");
    @(negedge clk); hold_done = 1;
    @(negedge clk); hold_done = 0;
    chk(int'(state), 0, "back to MIXING");
    chk(int'({v_outlet2, t_s_o2, t_l_o2, heater2}), 0, "holding outputs idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
