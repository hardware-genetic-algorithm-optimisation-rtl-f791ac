// tank_controller - finite-state control circuit of a two-tank glue plant.
//
// The plant mixes and heats starch and water in a mixing tank (state MIXING), then pumps
// the glue to a holding tank (state HOLDING), from which it is pumped to the gluing
// machines ten seconds on, five seconds off. The controller is decomposed by state: the
// combinational logic of each state is an evolved circuit, held in a VRC of its own, with
// four inputs and four outputs. The state line selects which VRC drives the actuators;
// the other state's actuator outputs are held low. The controller's five sub-circuits are
// those of the published design: combinational logic (the two VRCs), sequential logic
// (tank_state_reg), a counter circuit (sec_counter) and two timing circuits (10 s and
// 5 s tank_timer). The output names and the 10 s / 5 s cycle are published; which
// sensors feed which VRC input and the transition conditions are this design's choices,
// since the truth tables of the two states are not given. They are loaded as chromosomes.
//
// VRC of state MIXING:  inputs  = sense_mix[3:0]
//                       outputs = {v_inlet1, v_outlet1, heater1, pump1} (bit 3 .. 0)
// VRC of state HOLDING: inputs  = {t_short_expired, t_long_expired, sense_hold[1:0]}
//                       outputs = {v_outlet2, t_s_o2, t_l_o2, heater2} (bit 3 .. 0)
// t_l_o2 runs the 10-second timer and t_s_o2 the 5-second timer; their expiry flags are
// the timer inputs of the HOLDING logic.
//
// Interface: cfg_sel picks the VRC (0 = MIXING, 1 = HOLDING) that cfg_we/waddr/wdata
// writes; mix_done/hold_done are the state transition conditions.
// Timing: actuator outputs are combinational from the sensors, state and timers.
module tank_controller
  import ehw_pkg::*;
#(
  parameter int unsigned TICKS      = 50_000_000, // clocks per second (assumed 50 MHz)
  parameter int unsigned LONG_SECS  = 10,         // pump on time
  parameter int unsigned SHORT_SECS = 5,          // pump off time
  parameter int unsigned GW         = gene_width(ROWS, COLS, N_IN),
  parameter int unsigned NG         = n_genes(ROWS, COLS, N_OUT),
  parameter int unsigned AW         = $clog2(NG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_sel,
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_waddr,
  input  logic [GW-1:0] cfg_wdata,
  input  logic [3:0]    sense_mix,
  input  logic [1:0]    sense_hold,
  input  logic          mix_done,
  input  logic          hold_done,
  output logic          state,
  output logic          pump1,
  output logic          heater1,
  output logic          v_outlet1,
  output logic          v_inlet1,
  output logic          heater2,
  output logic          t_l_o2,
  output logic          t_s_o2,
  output logic          v_outlet2,
  output logic          t_long_expired,
  output logic          t_short_expired,
  output logic          chrom_err
);

  logic [3:0]            out1, out2;
  logic [NG-1:0][GW-1:0] genes1, genes2;
  logic                  err1, err2, tick;
  logic [GW-1:0]         rd1, rd2;

  tank_state_reg u_state (.clk, .rst_n, .mix_done, .hold_done, .state);

  vrc u_vrc_mix (
    .clk, .rst_n, .cfg_we(cfg_we && !cfg_sel), .cfg_waddr, .cfg_wdata,
    .cfg_raddr('0), .cfg_rdata(rd1), .ext_in(sense_mix), .ext_out(out1),
    .genes(genes1), .route_err(err1));

  vrc u_vrc_hold (
    .clk, .rst_n, .cfg_we(cfg_we && cfg_sel), .cfg_waddr, .cfg_wdata,
    .cfg_raddr('0), .cfg_rdata(rd2), .ext_in({t_short_expired, t_long_expired, sense_hold}),
    .ext_out(out2), .genes(genes2), .route_err(err2));

  sec_counter #(.TICKS(TICKS)) u_sec (.clk, .rst_n, .tick);

  tank_timer #(.SECONDS(LONG_SECS)) u_t_long (
    .clk, .rst_n, .tick, .run(t_l_o2), .expired(t_long_expired));

  tank_timer #(.SECONDS(SHORT_SECS)) u_t_short (
    .clk, .rst_n, .tick, .run(t_s_o2), .expired(t_short_expired));

  // the state line selects which state's combinational logic drives the plant
  assign {v_inlet1, v_outlet1, heater1, pump1} = state ? 4'b0 : out1;
  assign {v_outlet2, t_s_o2, t_l_o2, heater2}  = state ? out2 : 4'b0;
  assign chrom_err = err1 || err2;

endmodule
