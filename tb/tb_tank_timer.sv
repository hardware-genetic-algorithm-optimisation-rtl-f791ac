// tb_tank_timer - timing circuit with SECONDS = 10 and a tick every 4 clocks: expired
// rises after ten ticks with run high, stays while run is high, and clears with run;
// a run pulse shorter than ten ticks never expires.
module tb_tank_timer;
  localparam int SECS = 10, T = 4;
  logic clk = 0, rst_n = 0, tick = 0, run = 0, expired;
  int checks = 0, failures = 0, cyc = 0;

  tank_timer #(.SECONDS(SECS)) dut (.clk, .rst_n, .tick, .run, .expired);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tick <= ((cyc + 1) % T == 0);
  end

  initial begin
    int ticks_seen;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      @(negedge clk); run = 1;
      ticks_seen = 0;
      while (!expired) begin
        @(negedge clk);
        if (tick) ticks_seen++;
        if (ticks_seen > SECS + 1) break;
      end
      // expired comes within the clock after the tenth tick
      checks++;
      if (ticks_seen != SECS) begin
        failures++;
        $display("FAIL expired after %0d ticks", ticks_seen);
      end
      repeat (3 * T) @(negedge clk);
      checks++;
      if (!expired) begin failures++; $display("FAIL expired dropped while running"); end
      run = 0;
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (expired) begin failures++; $display("FAIL expired not cleared"); end
    end
    // short run
    run = 1;
    repeat ((SECS - 2) * T) @(negedge clk);
    checks++;
    if (expired) begin failures++; $display("FAIL expired early"); end
    run = 0;
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
