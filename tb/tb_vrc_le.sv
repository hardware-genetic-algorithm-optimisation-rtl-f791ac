// tb_vrc_le - exhaustive test of one logic element: every function code on every
// input pair, against a truth table written out independently.
module tb_vrc_le;
  import ehw_pkg::*;
  logic a, b, y;
  le_func_e func;
  int checks = 0, failures = 0;

  vrc_le dut (.a, .b, .func, .y);

  // expected outputs per function for (a,b) = 00, 01, 10, 11 (bit index = {a,b})
  localparam logic [3:0] TT [8] = '{4'b1000, 4'b1110, 4'b0011, 4'b0111,
                                    4'b0001, 4'b0110, 4'b1001, 4'b1100};
  initial begin
    for (int f = 0; f < 8; f++)
      for (int ab = 0; ab < 4; ab++) begin
        func = le_func_e'(f); {a, b} = 2'(ab);
        #1;
        checks++;
        if (y !== TT[f][ab]) begin
          failures++;
          $display("FAIL func=%0d a=%b b=%b y=%b", f, a, b, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
