// pp_compressor: partial-product adder array, the second multiplier step.
//
// N operands of W bits are reduced to two vectors, sum and carry, with
//   sum + carry == operand[0] + ... + operand[N-1]   (mod 2^W)
// by a linear array of 3:2 carry-save adders: the first two operands seed the
// (sum, carry) pair, and each further operand is folded in by one row of full
// adders whose carries are moved one place left. No carry propagates inside
// the array; the single carry-propagate addition is left to the final adder.
// The design description names this step "adder array or partial product
// compression" without giving its structure; the linear carry-save array is
// this design's choice.
//
// Interface: purely combinational. N must be at least 2.
module pp_compressor #(
  parameter int N = 8,   // number of operands
  parameter int W = 16   // operand width
) (
  input  logic [W-1:0] op [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  always_comb begin
    logic [W-1:0] s, c, maj;
    s = op[0];
    c = op[1];
    for (int i = 2; i < N; i++) begin
      maj = (s & c) | (s & op[i]) | (c & op[i]);
      s   = s ^ c ^ op[i];
      c   = maj << 1;
    end
    sum   = s;
    carry = c;
  end

endmodule
