// booth_mult: combinational signed multiplier, used as the "Mul" of every tap
// of the shift-register FIR filter.
//
// It follows the three steps of the multiplier description: booth_pp_gen
// recodes Y (radix 2) and forms B_W sign-extended partial products of X,
// pp_compressor reduces them with a carry-save adder array to a sum and a
// carry vector, and one carry-propagate adder makes the product.
//   p = x * y, exact, A_W + B_W bits, two's complement.
// The sign of the result therefore comes out of the Booth arithmetic itself;
// the flow chart's "check MSB of both digits" decision (equal MSBs give a
// positive product, unequal a negative one) holds for every non-zero product
// and is checked by an assertion rather than built as a separate path.
module booth_mult #(
  parameter int A_W = 8,
  parameter int B_W = 8
) (
  input  logic signed [A_W-1:0]     x,
  input  logic signed [B_W-1:0]     y,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int P_W = A_W + B_W;

  logic [P_W-1:0] pp [B_W];
  logic [B_W-1:0] neg;
  logic [P_W-1:0] s, c;

  booth_pp_gen #(.A_W(A_W), .B_W(B_W), .P_W(P_W)) u_pp (
    .x(x), .y(y), .pp(pp), .neg(neg)
  );

  if (B_W >= 2) begin : g_array
    pp_compressor #(.N(B_W), .W(P_W)) u_csa (.op(pp), .sum(s), .carry(c));
  end else begin : g_single
    assign s = pp[0];
    assign c = '0;
  end

  assign p = signed'(s + c);   // final (carry-propagate) addition

  // Sign rule of the flow chart: unequal MSBs -> negative, equal -> positive.
  always_comb begin
    if (x != '0 && y != '0)
      assert (p[P_W-1] == (x[A_W-1] ^ y[B_W-1]))
        else $error("booth_mult: product sign disagrees with operand MSBs");
  end

endmodule
