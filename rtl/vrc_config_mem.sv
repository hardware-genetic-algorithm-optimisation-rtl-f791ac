// vrc_config_mem - configuration memory of the VRC: holds the chromosome (the virtual
// bitstream) that sets every LE's function and every routing switch.
//
// The host downloads a chromosome one gene at a time through a simple write port
// (we, waddr, wdata); all genes are presented in parallel to the LE array. A read port
// lets the host read a gene back and check the download. Reset clears every gene, which
// configures all LEs as AND gates fed by source 0. The gene-wide write port, the
// read-back port and the reset value are this design's choices: the published design
// only says a configuration memory holds the virtual bitstream.
//
// Interface: we/waddr/wdata - gene write; raddr/rdata - gene read-back;
// genes - the whole chromosome.
// Timing: a write is visible on genes and rdata from the cycle after the write edge;
// rdata is combinational from raddr.
module vrc_config_mem
  import ehw_pkg::*;
#(
  parameter int unsigned NG = n_genes(ROWS, COLS, N_OUT),
  parameter int unsigned GW = gene_width(ROWS, COLS, N_IN),
  parameter int unsigned AW = $clog2(NG)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [GW-1:0]         wdata,
  input  logic [AW-1:0]         raddr,
  output logic [GW-1:0]         rdata,
  output logic [NG-1:0][GW-1:0] genes
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      genes <= '0;
    else if (we && 32'(waddr) < NG)
      genes[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < NG) ? genes[raddr] : '0;

endmodule
