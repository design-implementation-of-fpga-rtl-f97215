// tb_fir_sr: self-check of the shift-register FIR filter. Runs the default
// four-tap filter and a five-tap instance with asymmetric coefficients (so
// a tap-order error shows) on random samples with random gaps, including
// full-scale runs of -128 and +127, and the default filter with unsigned
// samples (X_SIGNED = 0), where bit pattern 0x80 means +128. Each output is compared with the
// convolution sum over a sample history kept here, and out_valid must
// follow in_valid by exactly one cycle.
module tb_fir_sr;
  localparam logic signed [7:0] CA [4] = '{-8'sd5, 8'sd37, 8'sd37, -8'sd5};
  localparam logic signed [7:0] CB [5] = '{8'sd3, -8'sd128, 8'sd127, 8'sd11, -8'sd60};
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] x_in = '0;
  logic signed [17:0] ya;
  logic signed [18:0] yb;
  logic signed [17:0] yu;
  logic va, vb, vu;
  int checks = 0, failures = 0;
  int hist [5], uhist [4];

  fir_sr dut_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_out(ya), .out_valid(va));
  fir_sr #(.DATA_W(8), .COEF_W(8), .TAPS(5), .COEFS(CB), .OUT_W(19)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_out(yb), .out_valid(vb));

  fir_sr #(.X_SIGNED(1'b0)) dut_u (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
                                  .y_out(yu), .out_valid(vu));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    foreach (uhist[k]) uhist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int ea, eb, eu;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x_in = 8'($urandom);
      if (t >= 10 && t < 20) x_in = -8'sd128;
      if (t >= 20 && t < 30) x_in = 8'sd127;
      if (in_valid) begin
        for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        for (int k = 3; k > 0; k--) uhist[k] = uhist[k-1];
        uhist[0] = int'($unsigned(x_in));
      end
      @(posedge clk); #1;
      ea = 0; eb = 0; eu = 0;
      for (int k = 0; k < 4; k++) eu += int'(CA[k]) * uhist[k];
      for (int k = 0; k < 4; k++) ea += int'(CA[k]) * hist[k];
      for (int k = 0; k < 5; k++) eb += int'(CB[k]) * hist[k];
      checks += 4;
      if (int'(yu) != eu) begin
        failures++;
        if (failures < 10) $display("t=%0d unsigned y=%0d expected %0d", t, yu, eu);
      end
      if (int'(ya) != ea) begin
        failures++;
        if (failures < 10) $display("t=%0d 4-tap y=%0d expected %0d", t, ya, ea);
      end
      if (int'(yb) != eb) begin
        failures++;
        if (failures < 10) $display("t=%0d 5-tap y=%0d expected %0d", t, yb, eb);
      end
      if (va !== in_valid || vb !== in_valid || vu !== in_valid) begin
        failures++;
        if (failures < 10) $display("t=%0d out_valid does not follow in_valid", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
