// tb_booth_pp_gen: exhaustive self-check of the radix-2 Booth partial-product
// generator at 8 x 8 bits. For every (x, y) pair each partial product is
// compared with d_i * x * 2^i, where the Booth digit d_i = y[i-1] - y[i]
// (y[-1] = 0) is computed here independently, the neg flags with d_i < 0,
// and the sum of all partial products with x * y.
module tb_booth_pp_gen;
  localparam int A_W = 8, B_W = 8, P_W = 16;
  logic signed [A_W-1:0] x;
  logic signed [B_W-1:0] y;
  logic [P_W-1:0] pp [B_W];
  logic [B_W-1:0] neg;
  int checks = 0, failures = 0;

  booth_pp_gen #(.A_W(A_W), .B_W(B_W), .P_W(P_W)) dut (.x(x), .y(y), .pp(pp), .neg(neg));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = -128; xi < 128; xi++) begin
      for (int yi = -128; yi < 128; yi++) begin
        int sum;
        x = A_W'(xi);
        y = B_W'(yi);
        #1;
        sum = 0;
        for (int i = 0; i < B_W; i++) begin
          int yb, ybm1, d, expv;
          yb   = (yi >> i) & 1;
          ybm1 = (i == 0) ? 0 : ((yi >> (i - 1)) & 1);
          d    = ybm1 - yb;
          expv = d * xi * (1 << i);
          checks++;
          if (pp[i] !== P_W'(expv) || neg[i] !== (d < 0)) begin
            failures++;
            if (failures < 10) $display("pp mismatch x=%0d y=%0d i=%0d got %h exp %h", xi, yi, i, pp[i], P_W'(expv));
          end
          sum += int'(signed'(pp[i]));
        end
        checks++;
        if (P_W'(sum) !== P_W'(xi * yi)) begin
          failures++;
          if (failures < 10) $display("sum mismatch x=%0d y=%0d", xi, yi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
