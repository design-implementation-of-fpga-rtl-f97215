// tb_da_lut: exhaustive self-check of the distributed-arithmetic table for
// the default four-tap coefficient set and for a three-tap instance with
// other coefficients. Each entry is compared with the sum of the
// coefficients whose address bit is set, computed here.
module tb_da_lut;
  localparam logic signed [7:0] C4 [4] = '{-8'sd5, 8'sd37, 8'sd37, -8'sd5};
  localparam logic signed [7:0] C3 [3] = '{8'sd127, -8'sd128, 8'sd99};
  logic [3:0] a4;
  logic [2:0] a3;
  logic signed [9:0] d4, d3;
  int checks = 0, failures = 0;

  da_lut dut4 (.addr(a4), .data(d4));
  da_lut #(.COEF_W(8), .TAPS(3), .COEFS(C3), .LUT_W(10)) dut3 (.addr(a3), .data(d3));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      int e;
      a4 = 4'(a);
      e = 0;
      for (int k = 0; k < 4; k++) if ((a >> k) & 1) e += int'(C4[k]);
      #1;
      checks++;
      if (int'(d4) != e) begin
        failures++;
        $display("4-tap addr %0d: got %0d expected %0d", a, d4, e);
      end
    end
    for (int a = 0; a < 8; a++) begin
      int e;
      a3 = 3'(a);
      e = 0;
      for (int k = 0; k < 3; k++) if ((a >> k) & 1) e += int'(C3[k]);
      #1;
      checks++;
      if (int'(d3) != e) begin
        failures++;
        $display("3-tap addr %0d: got %0d expected %0d", a, d3, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
