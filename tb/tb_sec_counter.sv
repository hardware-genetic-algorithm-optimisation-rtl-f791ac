// tb_sec_counter - time base: with TICKS = 7 the tick must be a one-cycle pulse every
// 7 clocks, the first one 7 clocks after reset.
module tb_sec_counter;
  localparam int TICKS = 7;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0;

  sec_counter #(.TICKS(TICKS)) dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  initial begin
    int last, n;
    last = 0; n = 0;
    @(negedge clk); rst_n = 1;
    for (int c = 1; c <= 20 * TICKS; c++) begin
      @(negedge clk);
      if (tick) begin
        n++;
        checks++;
        if (c - last != TICKS) begin
          failures++;
          $display("FAIL tick at clock %0d, previous %0d", c, last);
        end
        last = c;
      end
    end
    checks++;
    if (n != 20) begin failures++; $display("FAIL %0d ticks, exp 20", n); end
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
