// sec_counter - the counter circuit of the tank controller: a time base.
//
// Divides the system clock down to one tick per second, which the timing circuits count.
// The published controller has "a counter circuit" next to its two timing circuits but
// does not say what it counts; reading it as the timers' shared time base is this
// design's choice, as is the clock rate (CLK_HZ, not given).
//
// Interface: tick pulses high for one clock every TICKS clocks.
// Timing: first tick TICKS clocks after reset is released.
module sec_counter #(
  parameter int unsigned TICKS = 50_000_000   // clocks per second
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  logic [$clog2(TICKS)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == ($clog2(TICKS))'(TICKS - 1));
      cnt  <= (cnt == ($clog2(TICKS))'(TICKS - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
