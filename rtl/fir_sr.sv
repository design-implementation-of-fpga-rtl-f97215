// fir_sr: transversal FIR filter in shift-register form.
//
//   y = c[0]*t[0] + c[1]*t[1] + ... + c[TAPS-1]*t[TAPS-1]
//
// Structure (as in the shift-register filter's block diagram): the input
// sample enters a chain of TAPS shift registers ("SR"); the output t[k] of
// every register feeds one multiplier ("Mul", a booth_mult) with its constant
// coefficient c[k]; the products are summed by a chain of adders ("Add"),
// the first adder taking the products of taps 0 and 1, each later one adding
// the next product, the last one giving y.
//
// Interface and timing: when in_valid is high at a rising clock edge, x_in is
// shifted into t[0] and every t[k] moves to t[k+1]. y_out is combinational
// from the registers, so after the edge that takes sample x[n] it holds
//   y[n] = sum_k c[k] * x[n-k]
// and out_valid is high in the cycle after in_valid. y_out keeps its value
// until the next sample. Samples are two's complement by default; with
// X_SIGNED = 0 they are read as unsigned (x = sum x_b*2^b, the form of the
// bit-level DA equation). Reset clears the taps. Widths, coefficients, the
// valid strobe and the reset are this design's choices; the register chain,
// one multiplier per tap and the adder chain follow the description.
module fir_sr
#(
  parameter int DATA_W = fir_pkg::DEF_DATA_W,
  parameter int COEF_W = fir_pkg::DEF_COEF_W,
  parameter int TAPS   = fir_pkg::DEF_TAPS,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = fir_pkg::DEFAULT_COEFS,
  parameter int OUT_W  = fir_pkg::sop_width(DATA_W, COEF_W, TAPS),
  parameter bit X_SIGNED = 1'b1   // 1: two's-complement samples, 0: unsigned
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [OUT_W-1:0]  y_out,
  output logic                     out_valid
);

  // An unsigned sample gets a zero sign bit in front so the signed Booth
  // multiplier sees its true value.
  localparam int XM_W = X_SIGNED ? DATA_W : DATA_W + 1;
  localparam int P_W  = XM_W + COEF_W;

  logic signed [DATA_W-1:0] t    [TAPS];   // shift-register taps
  logic signed [XM_W-1:0]   xm   [TAPS];   // taps as multiplier operands
  logic signed [P_W-1:0]    prod [TAPS];   // multiplier outputs
  logic signed [OUT_W-1:0]  psum [TAPS];   // adder-chain partial sums

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) t[k] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        t[0] <= x_in;
        for (int k = 1; k < TAPS; k++) t[k] <= t[k-1];
      end
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    if (X_SIGNED) begin : g_s
      assign xm[k] = XM_W'(t[k]);
    end else begin : g_u
      assign xm[k] = signed'({1'b0, t[k]});
    end
    booth_mult #(.A_W(XM_W), .B_W(COEF_W)) u_mul (
      .x(xm[k]), .y(COEFS[k]), .p(prod[k])
    );
  end

  // Adder chain
  assign psum[0] = OUT_W'(prod[0]);
  for (genvar k = 1; k < TAPS; k++) begin : g_add
    assign psum[k] = psum[k-1] + OUT_W'(prod[k]);
  end

  assign y_out = psum[TAPS-1];

endmodule
