// da_accumulator: the "+/-" adder and "Register" of the distributed-
// arithmetic filter, with the register fed back to the adder.
//
// Bits of the samples are processed most significant first. Each enabled
// cycle the register is doubled (a one-place left shift) and the LUT word is
// added, or subtracted when sub is high:
//   acc <= (first ? 0 : 2*acc) + (sub ? -lut_in : lut_in)
// For two's-complement samples the sign bit has weight -2^(B-1), so the
// controller raises sub (and first) for the sign bit and adds for all other
// bits; after B cycles acc holds sum_k c[k]*x[k] exactly.
//
// Interface and timing: registered, result visible the cycle after each
// enabled edge. acc holds when en is low. Asynchronous active-low reset.
// The description names the adder/subtractor, the register and the feedback
// path; the MSB-first order (left shift) and the start flag are this design's
// choices.
module da_accumulator #(
  parameter int LUT_W = 10,
  parameter int ACC_W = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic                    sub,
  input  logic signed [LUT_W-1:0] lut_in,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] base, term;

  always_comb begin
    base = first ? '0 : (acc <<< 1);
    term = sub ? -ACC_W'(lut_in) : ACC_W'(lut_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= base + term;
  end

endmodule
