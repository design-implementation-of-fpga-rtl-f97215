// tb_mac: self-check of the multiplier-accumulator. Random operand streams
// with random gaps (in_valid low), clear together with an operand (restart
// the sum) and clear alone are applied; after every clock edge acc is
// compared with a reference accumulator kept in the testbench, including the
// wrap-around modulo 2^ACC_W. The one-cycle latency is checked by comparing
// right after each edge.
module tb_mac;
  localparam int A_W = 8, B_W = 8, GUARD = 4, ACC_W = 20;
  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0;
  logic signed [A_W-1:0] x = '0;
  logic signed [B_W-1:0] y = '0;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] model;
  int checks = 0, failures = 0, n_clear_load = 0, n_clear_only = 0;

  mac #(.A_W(A_W), .B_W(B_W), .GUARD(GUARD), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(clear), .x(x), .y(y), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      clear    = ($urandom_range(0, 63) == 0);
      x = A_W'($urandom);
      y = B_W'($urandom);
      if (t < 4) begin x = -8'sd128; y = -8'sd128; end
      if (in_valid) begin
        model = (clear ? '0 : model) + ACC_W'(x * y);
        if (clear) n_clear_load++;
      end else if (clear) begin
        model = '0;
        n_clear_only++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 10) $display("t=%0d acc=%0d expected %0d", t, acc, model);
      end
    end
    checks++;
    if (n_clear_load == 0 || n_clear_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
