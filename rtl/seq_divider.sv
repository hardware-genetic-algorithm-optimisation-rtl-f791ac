// seq_divider - unsigned restoring divider, one quotient bit per clock.
//
// Computes q = floor(num / den) for W-bit operands. A division by zero returns all ones.
// Used by the fitness calculator to form the ratios of the fitness function.
//
// Interface: start (pulse, while !busy) loads num and den; done pulses for one cycle
// when q is valid; q holds until the next start.
// Timing: done W + 1 cycles after the start edge.
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] q
);

  logic [W-1:0]         rem, d;
  logic [$clog2(W+1)-1:0] n;
  logic [W+1:0]         trial;

  assign trial = {1'b0, rem, q[W-1]} - {2'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; d <= '0; q <= '0; n <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem <= '0; d <= den; q <= num; n <= '0; busy <= 1'b1;
      end else if (busy) begin
        // shift the next dividend bit into the remainder, subtract if it fits
        if (!trial[W+1]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
