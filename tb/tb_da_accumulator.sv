// tb_da_accumulator: self-check of the shift accumulator. Random bursts of
// B = 8 steps are driven the way the DA filter drives it (first step with
// first and sub, then seven adding steps) with random LUT words and random
// idle cycles in between (en low, acc must hold). After every edge acc is
// compared with 2*acc +/- lut computed here; after each burst the result is
// also compared with the closed form -L7*2^7 + sum L_b*2^b.
module tb_da_accumulator;
  localparam int LUT_W = 10, ACC_W = 18, B = 8;
  logic clk = 0, rst_n = 0, en = 0, first = 0, sub = 0;
  logic signed [LUT_W-1:0] lut_in = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;
  longint model, closed;

  da_accumulator #(.LUT_W(LUT_W), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .first(first), .sub(sub), .lut_in(lut_in), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (longint'(acc) != model) begin
      failures++;
      if (failures < 10) $display("%s: acc=%0d expected %0d", what, acc, model);
    end
  endtask

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 2000; burst++) begin
      closed = 0;
      for (int b = B - 1; b >= 0; b--) begin
        longint l;
        @(negedge clk);
        en = 1; first = (b == B - 1); sub = (b == B - 1);
        lut_in = LUT_W'($urandom);
        l = longint'(lut_in);
        model  = (first ? 0 : 2 * model) + (sub ? -l : l);
        closed += (b == B - 1) ? -l * (1 << b) : l * (1 << b);
        @(posedge clk); #1;
        check("step");
      end
      checks++;
      if (longint'(acc) != closed) begin
        failures++;
        if (failures < 10) $display("burst %0d: acc=%0d closed form %0d", burst, acc, closed);
      end
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        en = 0; lut_in = LUT_W'($urandom); first = $urandom_range(0, 1) == 1;
        @(posedge clk); #1;
        check("hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
