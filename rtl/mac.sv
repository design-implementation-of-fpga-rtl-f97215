// mac: multiplier-accumulator built from the three multiplier steps.
//
//  1. booth_pp_gen: radix-2 Booth recoding of y, B_W partial products of x,
//     sign-extended to the accumulator width ACC_W.
//  2. pp_compressor: the partial products and the current accumulator value
//     are reduced together by one carry-save adder array, so the accumulation
//     costs no separate adder.
//  3. Final addition: one carry-propagate adder turns the (sum, carry) pair
//     into the new accumulator value, i.e. the accumulation is part of the
//     final addition, as the multiplier description puts it.
//
// Interface and timing: on a rising clock edge with in_valid high,
//   acc <= (clear ? 0 : acc) + x*y
// With clear high and in_valid low, acc <= 0. The result is visible in acc
// one cycle after the operands. acc wraps modulo 2^ACC_W; GUARD extra bits
// above the product width allow 2^GUARD accumulations without overflow.
// An active-low asynchronous reset clears acc. The handshake,
// reset, clear and guard bits are this design's choices; the description
// gives only the three steps.
module mac #(
  parameter int A_W   = 8,
  parameter int B_W   = 8,
  parameter int GUARD = 4,
  parameter int ACC_W = A_W + B_W + GUARD
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    clear,
  input  logic signed [A_W-1:0]   x,
  input  logic signed [B_W-1:0]   y,
  output logic signed [ACC_W-1:0] acc
);

  logic [ACC_W-1:0] pp  [B_W];
  logic [ACC_W-1:0] ops [B_W+1];
  logic [B_W-1:0]   neg;
  logic [ACC_W-1:0] s, c;

  booth_pp_gen #(.A_W(A_W), .B_W(B_W), .P_W(ACC_W)) u_pp (
    .x(x), .y(y), .pp(pp), .neg(neg)
  );

  always_comb begin
    for (int i = 0; i < B_W; i++) ops[i] = pp[i];
    ops[B_W] = clear ? '0 : acc;   // accumulator enters the adder array
  end

  pp_compressor #(.N(B_W+1), .W(ACC_W)) u_csa (.op(ops), .sum(s), .carry(c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (in_valid) acc <= signed'(s + c);   // final addition with accumulation
    else if (clear)    acc <= '0;
  end

endmodule
