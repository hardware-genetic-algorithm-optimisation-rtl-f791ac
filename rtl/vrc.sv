// vrc - the virtual reconfigurable circuit: configuration memory plus LE array.
//
// A chromosome written gene by gene into the configuration memory immediately
// reconfigures the 20-LE array, which then computes its 4 external outputs from its 4
// external inputs combinationally. The division into LEs, interconnection network and
// configuration memory follows the published design.
//
// Interface: cfg_* - gene download and read-back port (see vrc_config_mem);
// ext_in/ext_out - the circuit's external inputs and outputs; genes - current chromosome;
// route_err - some routing gene names an illegal source.
// Timing: one cycle from a gene write to the new configuration; combinational from
// ext_in to ext_out.
module vrc
  import ehw_pkg::*;
#(
  parameter int unsigned R  = ROWS,
  parameter int unsigned C  = COLS,
  parameter int unsigned NI = N_IN,
  parameter int unsigned NO = N_OUT,
  parameter int unsigned GW = gene_width(R, C, NI),
  parameter int unsigned NG = n_genes(R, C, NO),
  parameter int unsigned AW = $clog2(NG)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [AW-1:0]         cfg_waddr,
  input  logic [GW-1:0]         cfg_wdata,
  input  logic [AW-1:0]         cfg_raddr,
  output logic [GW-1:0]         cfg_rdata,
  input  logic [NI-1:0]         ext_in,
  output logic [NO-1:0]         ext_out,
  output logic [NG-1:0][GW-1:0] genes,
  output logic                  route_err
);

  logic [R*C-1:0] le_out;

  vrc_config_mem #(.NG(NG), .GW(GW), .AW(AW)) u_mem (
    .clk, .rst_n, .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .raddr(cfg_raddr), .rdata(cfg_rdata), .genes);

  vrc_array #(.R(R), .C(C), .NI(NI), .NO(NO), .GW(GW), .NG(NG)) u_array (
    .ext_in, .genes, .ext_out, .le_out, .route_err);

endmodule
