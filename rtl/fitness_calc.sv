// fitness_calc - computes the overall fitness of a tested phenotype.
//
// From the counts gathered by tt_tester it forms, in fixed point with FIT_ONE = 100 %:
//   f_elem    = correct output elements / output elements              (Equation 2)
//   f_cp      = correct critical-path vectors / critical-path vectors  (Equation 3)
//   f_partial = mean over outputs k of 0.5*(t_ok/n_t) + 0.5*(f_ok/n_f) (Equation 4)
//   f_overall = 0.3*f_elem + 0.4*f_cp + 0.3*f_partial                  (Equation 5)
//   f_ov      = correct output vectors / output vectors                (Equation 1)
// The formulas and weights are the published design's. The arithmetic is this design's:
// every ratio is floor(numerator * FIT_ONE / denominator), worked out one after another
// on a single shared restoring divider, and the last step is
//   f_overall = floor((6*NO*f_elem + 8*NO*f_cp + 3*P) / (20*NO)),
// where P = sum over k of (t_ratio_k + f_ratio_k). If an output column of the target has
// no true (or no false) bits, that half of its partial score counts as FIT_ONE.
//
// Interface: start (pulse, while !busy) latches nothing - the counts must stay stable
// until done; done pulses once when all outputs are valid; they hold until the next start.
// Timing: 2*NO + 5 divisions of DIV_W + 1 cycles each plus 2 cycles per step (divisions
// with a zero denominator are skipped): at most 443 cycles for 4 outputs.
module fitness_calc
  import ehw_pkg::*;
#(
  parameter int unsigned NI    = N_IN,
  parameter int unsigned NO    = N_OUT,
  parameter int unsigned NV    = 1 << NI,
  parameter int unsigned CW    = $clog2(NV * NO + 1),
  parameter int unsigned DIV_W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [CW-1:0]         vec_ok,
  input  logic [CW-1:0]         elem_ok,
  input  logic [NO-1:0]         cp_ok,
  input  logic [NO-1:0][CW-1:0] t_ok,
  input  logic [NO-1:0][CW-1:0] f_ok,
  input  logic [NO-1:0][CW-1:0] n_t,
  input  logic [NO-1:0][CW-1:0] n_f,
  output logic                  busy,
  output logic                  done,
  output logic [FIT_W-1:0]      f_elem,
  output logic [FIT_W-1:0]      f_cp,
  output logic [FIT_W-1:0]      f_partial,
  output logic [FIT_W-1:0]      f_overall,
  output logic [FIT_W-1:0]      f_ov
);

  // division steps
  localparam int unsigned S_ELEM = 2 * NO;
  localparam int unsigned S_CP   = 2 * NO + 1;
  localparam int unsigned S_OV   = 2 * NO + 2;
  localparam int unsigned S_PART = 2 * NO + 3;
  localparam int unsigned S_ALL  = 2 * NO + 4;
  localparam int unsigned IW     = $clog2(S_ALL + 1);

  typedef enum logic [1:0] {IDLE, ISSUE, WAIT} state_e;

  state_e            st;
  logic [IW-1:0]     idx;
  logic [DIV_W-1:0]  num, den, q;
  logic [DIV_W-1:0]  psum;          // sum of the 2*NO partial ratios
  logic              div_start, div_busy, div_done;

  // numerator and denominator of the current step
  always_comb begin
    num = '0;
    den = DIV_W'(1);
    if (32'(idx) < NO) begin
      num = DIV_W'(t_ok[idx]) * DIV_W'(FIT_ONE);
      den = DIV_W'(n_t[idx]);
    end else if (32'(idx) < 2 * NO) begin
      num = DIV_W'(f_ok[32'(idx) - NO]) * DIV_W'(FIT_ONE);
      den = DIV_W'(n_f[32'(idx) - NO]);
    end else begin
      unique case (32'(idx))
        S_ELEM: begin num = DIV_W'(elem_ok) * DIV_W'(FIT_ONE); den = DIV_W'(NV * NO); end
        S_CP:   begin num = DIV_W'($countones(cp_ok)) * DIV_W'(FIT_ONE); den = DIV_W'(NO); end
        S_OV:   begin num = DIV_W'(vec_ok) * DIV_W'(FIT_ONE); den = DIV_W'(NV); end
        S_PART: begin num = psum; den = DIV_W'(2 * NO); end
        S_ALL:  begin
          num = DIV_W'(6 * NO) * DIV_W'(f_elem) + DIV_W'(8 * NO) * DIV_W'(f_cp)
              + DIV_W'(3) * psum;
          den = DIV_W'(20 * NO);
        end
        default: ;
      endcase
    end
  end

  assign div_start = (st == ISSUE) && (den != '0);

  seq_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start), .num, .den,
    .busy(div_busy), .done(div_done), .q);

  // result of the step: the quotient, or 100 % for an empty truth-table column
  logic [DIV_W-1:0] res;
  assign res = (st == ISSUE) ? DIV_W'(FIT_ONE) : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; idx <= '0; psum <= '0; busy <= 1'b0; done <= 1'b0;
      f_elem <= '0; f_cp <= '0; f_partial <= '0; f_overall <= '0; f_ov <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE:
          if (start) begin
            st <= ISSUE; idx <= '0; psum <= '0; busy <= 1'b1;
          end
        ISSUE:
          // a zero denominator only occurs for a partial ratio: store 100 % directly
          if (den != '0) st <= WAIT;
          else begin
            psum <= psum + res;
            idx  <= idx + 1'b1;
          end
        WAIT:
          if (div_done) begin
            if (32'(idx) < 2 * NO) psum <= psum + res;
            unique case (32'(idx))
              S_ELEM: f_elem    <= FIT_W'(res);
              S_CP:   f_cp      <= FIT_W'(res);
              S_OV:   f_ov      <= FIT_W'(res);
              S_PART: f_partial <= FIT_W'(res);
              S_ALL:  f_overall <= FIT_W'(res);
              default: ;
            endcase
            if (32'(idx) == S_ALL) begin
              st <= IDLE; busy <= 1'b0; done <= 1'b1;
            end else begin
              st  <= ISSUE;
              idx <= idx + 1'b1;
            end
          end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
