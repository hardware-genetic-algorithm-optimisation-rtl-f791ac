// tank_state_reg - the sequential logic of the tank controller: its state register.
//
// The glue plant has two states: MIXING (starch and water are mixed and heated in the
// mixing tank) and HOLDING (the glue is pumped to, kept warm in and pumped from the
// holding tank). The register moves MIXING -> HOLDING when `mix_done` is high and
// HOLDING -> MIXING when `hold_done` is high. The two states are the published ones; the
// exact transition conditions are not given, so they enter as the two condition inputs.
//
// Interface: mix_done / hold_done - transition conditions; state - current state
// (the state line that selects the combinational logic of that state).
// Timing: state changes on the clock edge at which its condition is seen.
module tank_state_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mix_done,
  input  logic       hold_done,
  output logic       state       // 0 = MIXING, 1 = HOLDING
);

  typedef enum logic {MIXING = 1'b0, HOLDING = 1'b1} tank_state_e;
  tank_state_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= MIXING;
    end else begin
      unique case (st)
        MIXING:  if (mix_done)  st <= HOLDING;
        HOLDING: if (hold_done) st <= MIXING;
        default: st <= MIXING;
      endcase
    end
  end

  assign state = st;

endmodule
