// tb_pp_compressor: self-check of the carry-save adder array. Random operand
// sets (and all-ones / all-zero corner sets) are applied to an 8-operand,
// 16-bit array and to a 3-operand array; sum + carry must equal the plain sum
// of the operands modulo 2^W.
module tb_pp_compressor;
  localparam int W = 16;
  logic [W-1:0] op8 [8];
  logic [W-1:0] op3 [3];
  logic [W-1:0] s8, c8, s3, c3;
  int checks = 0, failures = 0;

  pp_compressor #(.N(8), .W(W)) dut8 (.op(op8), .sum(s8), .carry(c8));
  pp_compressor #(.N(3), .W(W)) dut3 (.op(op3), .sum(s3), .carry(c3));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] e8, e3;
      e8 = '0; e3 = '0;
      for (int i = 0; i < 8; i++) begin
        op8[i] = (t == 0) ? '1 : (t == 1) ? '0 : W'($urandom);
        e8 += op8[i];
      end
      for (int i = 0; i < 3; i++) begin
        op3[i] = (t == 0) ? '1 : W'($urandom);
        e3 += op3[i];
      end
      #1;
      checks += 2;
      if (W'(s8 + c8) !== e8) begin
        failures++;
        if (failures < 10) $display("N=8 mismatch: %h + %h != %h", s8, c8, e8);
      end
      if (W'(s3 + c3) !== e3) begin
        failures++;
        if (failures < 10) $display("N=3 mismatch: %h + %h != %h", s3, c3, e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
