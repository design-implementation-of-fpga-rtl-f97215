// fir_top: the two constant-coefficient FIR filter architectures side by
// side, plus the multiplier-accumulator.
//
// One input sample stream (x_in, in_valid, in_ready) feeds both filters with
// the same coefficients, so their outputs must agree:
//  - fir_sr: shift-register taps, one Booth multiplier per tap, adder chain.
//    Fully parallel; its result is ready the cycle after a sample.
//  - fir_da: distributed arithmetic, LUT plus shift-accumulator, bit-serial;
//    it needs DATA_W+1 cycles per sample.
// A sample is accepted only when the DA filter is ready, and the same strobe
// shifts it into the shift-register filter, so both keep the same taps.
// sr_valid/sr_y and da_valid/da_y report the two results. X_SIGNED selects
// two's-complement (default) or unsigned samples for both filters.
// The MAC (mac_*) has its own ports: the description presents it as the
// multiplier-and-accumulator unit without wiring it into either filter.
// Running both filters on one stream is this design's choice, made so the two
// architectures can be compared in one simulation.
module fir_top
#(
  parameter int DATA_W = fir_pkg::DEF_DATA_W,
  parameter int COEF_W = fir_pkg::DEF_COEF_W,
  parameter int TAPS   = fir_pkg::DEF_TAPS,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = fir_pkg::DEFAULT_COEFS,
  parameter int OUT_W  = fir_pkg::sop_width(DATA_W, COEF_W, TAPS),
  parameter bit X_SIGNED = 1'b1,   // 0: samples are unsigned
  parameter int MAC_GUARD = 4,
  parameter int MAC_W  = DATA_W + COEF_W + MAC_GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sample stream
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] x_in,
  // shift-register filter result
  output logic signed [OUT_W-1:0]  sr_y,
  output logic                     sr_valid,
  // distributed-arithmetic filter result
  output logic signed [OUT_W-1:0]  da_y,
  output logic                     da_valid,
  // multiplier-accumulator
  input  logic                     mac_valid,
  input  logic                     mac_clear,
  input  logic signed [DATA_W-1:0] mac_x,
  input  logic signed [COEF_W-1:0] mac_y,
  output logic signed [MAC_W-1:0]  mac_acc
);

  logic take;
  assign take = in_valid && in_ready;

  fir_sr #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .COEFS(COEFS),
           .OUT_W(OUT_W), .X_SIGNED(X_SIGNED)) u_sr (
    .clk(clk), .rst_n(rst_n), .in_valid(take), .x_in(x_in),
    .y_out(sr_y), .out_valid(sr_valid)
  );

  fir_da #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .COEFS(COEFS),
           .OUT_W(OUT_W), .X_SIGNED(X_SIGNED)) u_da (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .y_out(da_y), .out_valid(da_valid)
  );

  mac #(.A_W(DATA_W), .B_W(COEF_W), .GUARD(MAC_GUARD), .ACC_W(MAC_W)) u_mac (
    .clk(clk), .rst_n(rst_n), .in_valid(mac_valid), .clear(mac_clear),
    .x(mac_x), .y(mac_y), .acc(mac_acc)
  );

endmodule
