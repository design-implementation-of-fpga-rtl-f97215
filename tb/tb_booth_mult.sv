// tb_booth_mult: exhaustive self-check of the 8 x 8 Booth multiplier (every
// signed operand pair against the integer product) plus random 12 x 6
// operands on a second instance with unequal widths.
module tb_booth_mult;
  logic signed [7:0]  x, y;
  logic signed [15:0] p;
  logic signed [11:0] xa;
  logic signed [5:0]  ya;
  logic signed [17:0] pa;
  int checks = 0, failures = 0;

  booth_mult #(.A_W(8),  .B_W(8)) dut  (.x(x),  .y(y),  .p(p));
  booth_mult #(.A_W(12), .B_W(6)) duta (.x(xa), .y(ya), .p(pa));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = -128; xi < 128; xi++)
      for (int yi = -128; yi < 128; yi++) begin
        x = 8'(xi); y = 8'(yi);
        #1;
        checks++;
        if (int'(p) != xi * yi) begin
          failures++;
          if (failures < 10) $display("8x8: %0d * %0d gave %0d", xi, yi, p);
        end
      end
    for (int t = 0; t < 2000; t++) begin
      int xi, yi;
      xi = int'($urandom_range(0, 4095)) - 2048;
      yi = int'($urandom_range(0, 63)) - 32;
      xa = 12'(xi); ya = 6'(yi);
      #1;
      checks++;
      if (int'(pa) != xi * yi) begin
        failures++;
        if (failures < 10) $display("12x6: %0d * %0d gave %0d", xi, yi, pa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
