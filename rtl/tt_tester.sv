// tt_tester - tests the configured VRC against a target truth table.
//
// After `start`, the tester drives every input vector 0 .. 2**NI-1 in turn onto the
// VRC's external inputs, one vector per clock, and compares the VRC's outputs with the
// target truth table. It gathers the counts the fitness function needs:
//   vec_ok      - output vectors that are entirely correct (Equation 1)
//   elem_ok     - individual output elements that are correct (Equation 2)
//   cp_ok[k]    - the critical-path (CP) vector of output k, i.e. its whole column of
//                 the truth table, is correct (Equation 3)
//   t_ok/f_ok   - per output, correct true bits and correct false bits (Equation 4)
//   n_t/n_f     - per output, how many true and false bits the target column holds
// The sequential testing follows the published design; doing it in hardware at one
// vector per clock is this design's choice (the VRC settles within one cycle).
//
// Interface: start (pulse) begins a test; busy is high while testing; done pulses for
// one cycle when the counts are valid (they hold until the next start).
// vec_in -> VRC ext_in, vrc_out <- VRC ext_out. target[v] is the desired output vector
// for input vector v.
// Timing: done rises 2**NI + 1 cycles after the start edge.
module tt_tester
  import ehw_pkg::*;
#(
  parameter int unsigned NI = N_IN,
  parameter int unsigned NO = N_OUT,
  parameter int unsigned NV = 1 << NI,          // input vectors
  parameter int unsigned CW = $clog2(NV * NO + 1) // width of the counts
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NV-1:0][NO-1:0] target,
  output logic [NI-1:0]         vec_in,
  input  logic [NO-1:0]         vrc_out,
  output logic                  busy,
  output logic                  done,
  output logic [CW-1:0]         vec_ok,
  output logic [CW-1:0]         elem_ok,
  output logic [NO-1:0]         cp_ok,
  output logic [NO-1:0][CW-1:0] t_ok,
  output logic [NO-1:0][CW-1:0] f_ok,
  output logic [NO-1:0][CW-1:0] n_t,
  output logic [NO-1:0][CW-1:0] n_f
);

  logic [NI-1:0] vec;
  logic          last;
  logic [NO-1:0] want, hit;

  assign vec_in = vec;
  assign last   = (vec == NI'(NV - 1));
  assign want   = target[vec];
  assign hit    = ~(want ^ vrc_out);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec <= '0; busy <= 1'b0; done <= 1'b0;
      vec_ok <= '0; elem_ok <= '0; cp_ok <= '0;
      t_ok <= '0; f_ok <= '0; n_t <= '0; n_f <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        vec <= '0; busy <= 1'b1;
        vec_ok <= '0; elem_ok <= '0; cp_ok <= '1;
        t_ok <= '0; f_ok <= '0; n_t <= '0; n_f <= '0;
      end else if (busy) begin
        if (&hit) vec_ok <= vec_ok + 1'b1;
        elem_ok <= elem_ok + CW'($countones(hit));
        for (int unsigned k = 0; k < NO; k++) begin
          if (!hit[k]) cp_ok[k] <= 1'b0;
          if (want[k]) begin
            n_t[k] <= n_t[k] + 1'b1;
            if (hit[k]) t_ok[k] <= t_ok[k] + 1'b1;
          end else begin
            n_f[k] <= n_f[k] + 1'b1;
            if (hit[k]) f_ok[k] <= f_ok[k] + 1'b1;
          end
        end
        vec <= vec + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
