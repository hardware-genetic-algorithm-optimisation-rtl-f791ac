// tb_tank_state_reg - state register: starts in MIXING after reset; random condition
// inputs must move it exactly as the two-state diagram MIXING <-> HOLDING says.
module tb_tank_state_reg;
  logic clk = 0, rst_n = 0, mix_done = 0, hold_done = 0, state;
  logic exp_state;
  int checks = 0, failures = 0, to_hold = 0, to_mix = 0;

  tank_state_reg dut (.clk, .rst_n, .mix_done, .hold_done, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (state !== 1'b0) begin failures++; $display("FAIL reset state"); end
    rst_n = 1;
    exp_state = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      mix_done = ($urandom_range(3) == 0); hold_done = ($urandom_range(3) == 0);
      @(posedge clk);
      if (!exp_state && mix_done) begin exp_state = 1; to_hold++; end
      else if (exp_state && hold_done) begin exp_state = 0; to_mix++; end
      #1;
      checks++;
      if (state !== exp_state) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d state=%b exp=%b", i, state, exp_state);
      end
    end
    checks++;
    if (to_hold == 0 || to_mix == 0) begin failures++; $display("FAIL no transitions"); end
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
