// tank_timer - one timing circuit of the tank controller.
//
// While `run` is high the timer counts one-second ticks; `expired` rises once SECONDS
// ticks have been counted and stays high until `run` is seen low, which clears the
// timer. `expired` is a register, so no combinational path runs from `run` to it: the
// controller feeds it back into the logic that drives `run`.
// The holding tank's pump runs ten seconds on and five seconds off, so the controller
// has one 10-second and one 5-second timer, started by the combinational logic's timer
// outputs. The durations are the published ones; the run/expired handshake and the
// clear-on-release behaviour are this design's choices.
//
// Interface: tick - one-second time base; run - timer enable; expired - time is up.
// Timing: expired rises two clocks after the SECONDS-th tick seen with run high and
// falls one clock after run is seen low.
module tank_timer #(
  parameter int unsigned SECONDS = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic run,
  output logic expired
);

  logic [$clog2(SECONDS+1)-1:0] secs;


  localparam int unsigned SW = $clog2(SECONDS + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      secs    <= '0;
      expired <= 1'b0;
    end else if (!run) begin
      secs    <= '0;
      expired <= 1'b0;
    end else begin
      if (tick && secs != SW'(SECONDS)) secs <= secs + 1'b1;
      expired <= (secs == SW'(SECONDS));
    end
  end

endmodule
