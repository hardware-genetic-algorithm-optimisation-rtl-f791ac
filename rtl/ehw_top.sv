// ehw_top - evolvable-hardware system: evaluation platform plus evolved tank controller.
//
// The system has two parts that share one gene-download bus from the host that runs the
// genetic algorithm:
//   * evo_platform - a VRC whose chromosome the host replaces for every candidate, with
//     constraint checking, truth-table testing and the overall fitness function in
//     hardware. With a 2 x 2-bit multiplier truth table as target it evaluates the
//     multiplier phenotypes; with a state's truth table it evaluates that state's logic.
//   * tank_controller - the glue-plant state machine whose per-state combinational logic
//     runs in two further VRCs, loaded with the chromosomes evolved on the platform.
// cfg_dest selects the VRC a gene write goes to: 0 = platform, 1 = tank MIXING logic,
// 2 = tank HOLDING logic (3 writes nothing). Gene read-back is from the platform's VRC.
//
// Timing: see evo_platform (at most 462 cycles per evaluation) and tank_controller.
module ehw_top
  import ehw_pkg::*;
#(
  parameter int unsigned TICKS = 50_000_000,   // clocks per second of the tank timers
  parameter int unsigned GW    = gene_width(ROWS, COLS, N_IN),
  parameter int unsigned NG    = n_genes(ROWS, COLS, N_OUT),
  parameter int unsigned AW    = $clog2(NG),
  parameter int unsigned NV    = 1 << N_IN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // gene download
  input  logic [1:0]               cfg_dest,
  input  logic                     cfg_we,
  input  logic [AW-1:0]            cfg_waddr,
  input  logic [GW-1:0]            cfg_wdata,
  input  logic [AW-1:0]            cfg_raddr,
  output logic [GW-1:0]            cfg_rdata,
  // fitness evaluation
  input  logic [NV-1:0][N_OUT-1:0] target,
  input  logic                     eval_start,
  output logic                     eval_busy,
  output logic                     eval_done,
  output logic                     chrom_ok,
  output logic [FIT_W-1:0]         f_overall,
  output logic [FIT_W-1:0]         f_elem,
  output logic [FIT_W-1:0]         f_cp,
  output logic [FIT_W-1:0]         f_partial,
  output logic [FIT_W-1:0]         f_ov,
  output logic [N_OUT-1:0]         cp_ok,
  input  logic [N_IN-1:0]          ext_in,
  output logic [N_OUT-1:0]         ext_out,
  // glue plant
  input  logic [3:0]               sense_mix,
  input  logic [1:0]               sense_hold,
  input  logic                     mix_done,
  input  logic                     hold_done,
  output logic                     tank_state,
  output logic                     pump1,
  output logic                     heater1,
  output logic                     v_outlet1,
  output logic                     v_inlet1,
  output logic                     heater2,
  output logic                     t_l_o2,
  output logic                     t_s_o2,
  output logic                     v_outlet2,
  output logic                     t_long_expired,
  output logic                     t_short_expired,
  output logic                     tank_chrom_err
);

  evo_platform u_plat (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_dest == 2'd0), .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
    .target, .eval_start, .eval_busy, .eval_done, .chrom_ok,
    .f_overall, .f_elem, .f_cp, .f_partial, .f_ov, .cp_ok, .ext_in, .ext_out);

  tank_controller #(.TICKS(TICKS)) u_tank (
    .clk, .rst_n,
    .cfg_sel(cfg_dest == 2'd2), .cfg_we(cfg_we && (cfg_dest == 2'd1 || cfg_dest == 2'd2)),
    .cfg_waddr, .cfg_wdata,
    .sense_mix, .sense_hold, .mix_done, .hold_done, .state(tank_state),
    .pump1, .heater1, .v_outlet1, .v_inlet1, .heater2, .t_l_o2, .t_s_o2, .v_outlet2,
    .t_long_expired, .t_short_expired, .chrom_err(tank_chrom_err));

endmodule
