// tb_fir_da: self-check of the distributed-arithmetic FIR filter. Runs the
// default four-tap filter and a three-tap instance with asymmetric
// coefficients, and the default filter with unsigned samples (X_SIGNED = 0),
// on random samples offered with random gaps. Each result is
// compared with the convolution sum over a sample history kept here. The
// timing is checked too: out_valid must come exactly DATA_W + 1 = 9 cycles
// after the sample was taken, in_ready must be low in between, and the next
// sample may be taken in the cycle of out_valid.
module tb_fir_da;
  localparam int B = 8;
  localparam logic signed [7:0] CA [4] = '{-8'sd5, 8'sd37, 8'sd37, -8'sd5};
  localparam logic signed [7:0] CB [3] = '{8'sd127, -8'sd128, 8'sd19};
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] x_in = '0;
  logic signed [17:0] ya;
  logic signed [17:0] yb;
  logic signed [17:0] yu;
  logic va, vb, vu, ra, rb, ru;
  int checks = 0, failures = 0, n_out = 0, n_busy_reject = 0;
  int hist [4], uhist [4];
  int cyc = 0, take_cyc = -1;

  fir_da dut_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(ra), .x_in(x_in),
                .y_out(ya), .out_valid(va));
  fir_da #(.DATA_W(8), .COEF_W(8), .TAPS(3), .COEFS(CB), .OUT_W(18)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(rb), .x_in(x_in),
    .y_out(yb), .out_valid(vb));

  fir_da #(.X_SIGNED(1'b0)) dut_u (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(ru),
                                  .x_in(x_in), .y_out(yu), .out_valid(vu));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2ms;
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
    while (n_out < 3000) begin
      int ea, eb, eu;
      @(negedge clk);
      in_valid = ($urandom_range(0, 1) == 1);
      x_in = 8'($urandom);
      if (n_out < 8) x_in = (n_out[0]) ? 8'sd127 : -8'sd128;
      checks++;
      if (ra !== rb || ra !== ru) begin
        failures++;
        $display("the two instances disagree on in_ready");
      end
      if (in_valid && ra) begin
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        for (int k = 3; k > 0; k--) uhist[k] = uhist[k-1];
        uhist[0] = int'($unsigned(x_in));
        take_cyc = cyc;
      end else if (in_valid) begin
        n_busy_reject++;
      end
      @(posedge clk); #1;
      if (va || vb) begin
        ea = 0; eb = 0; eu = 0;
        for (int k = 0; k < 4; k++) eu += int'(CA[k]) * uhist[k];
        for (int k = 0; k < 4; k++) ea += int'(CA[k]) * hist[k];
        for (int k = 0; k < 3; k++) eb += int'(CB[k]) * hist[k];
        checks += 4;
        if (!vu || int'(yu) != eu) begin
          failures++;
          if (failures < 10) $display("unsigned y=%0d expected %0d", yu, eu);
        end
        n_out++;
        if (!(va && vb)) begin
          failures++;
          $display("out_valid differs between instances");
        end
        if (int'(ya) != ea) begin
          failures++;
          if (failures < 10) $display("4-tap y=%0d expected %0d", ya, ea);
        end
        if (int'(yb) != eb) begin
          failures++;
          if (failures < 10) $display("3-tap y=%0d expected %0d", yb, eb);
        end
        if (cyc - take_cyc != B + 1) begin
          failures++;
          if (failures < 10) $display("latency %0d cycles, expected %0d", cyc - take_cyc, B + 1);
        end
      end
    end
    checks++;
    if (n_busy_reject == 0) begin
      failures++;
      $display("in_ready never held off a sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
