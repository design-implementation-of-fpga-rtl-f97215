// booth_pp_gen: radix-2 Booth recoding and partial-product generation, the
// first of the three multiplier steps (encode, add the partial products, final
// addition).
//
// The multiplier Y is scanned in overlapping bit pairs (y[i], y[i-1]) with
// y[-1] = 0. Each pair selects one partial product, shifted left by i:
//   00, 11 -> 0      01 -> +X      10 -> -X
// X and Y are signed two's complement. Every partial product is sign-extended
// to the full output width P_W so the products can be summed with plain
// addition modulo 2^P_W. -X is formed as ~X + 1 directly (no separate
// correction row); the sign-extension-prevention trick is not used.
//
// Interface: purely combinational. pp[i] is the i-th partial product, neg[i]
// flags that the i-th recoded digit is -1 (used only for observation).
// The Booth recoding rule follows the design description; the sign-extended
// representation and the widths are this design's choice.
module booth_pp_gen #(
  parameter int A_W = 8,              // multiplicand X width
  parameter int B_W = 8,              // multiplier Y width (= number of partial products)
  parameter int P_W = A_W + B_W       // partial-product width
) (
  input  logic signed [A_W-1:0] x,
  input  logic signed [B_W-1:0] y,
  output logic        [P_W-1:0] pp  [B_W],
  output logic        [B_W-1:0] neg
);

  logic [B_W:0] yext;  // y with the implicit y[-1] = 0 appended at bit 0

  always_comb begin
    logic signed [P_W-1:0] xs;
    yext = {y, 1'b0};
    xs   = P_W'(x);              // sign-extend X to P_W bits
    for (int i = 0; i < B_W; i++) begin
      unique case (yext[i+1 -: 2])
        2'b01:   begin pp[i] = P_W'(xs <<< i);      neg[i] = 1'b0; end
        2'b10:   begin pp[i] = P_W'((-xs) <<< i);   neg[i] = 1'b1; end
        default: begin pp[i] = '0;                  neg[i] = 1'b0; end
      endcase
    end
  end

endmodule
