// fir_da: bit-serial FIR filter in distributed arithmetic (DA).
//
// The sum of products y = sum_k c[k]*x[k] is rewritten with the bits of the
// samples, x[k] = -x_{B-1}[k]*2^(B-1) + sum_{b<B-1} x_b[k]*2^b, as
//   y = sum_b (+/-) 2^b * lut(x_b[0], ..., x_b[TAPS-1]),
// so no multiplier is needed: a da_lut holds every coefficient sum and a
// da_accumulator shifts and adds (subtracts for the sign bit). With
// X_SIGNED = 0 the samples are unsigned, every bit has weight +2^b and the
// accumulator only adds.
//
// Structure: a tap shift register t[0..TAPS-1] holds the last TAPS samples
// (t[0] the newest). A bit counter selects bit b of every tap, b running from
// DATA_W-1 (sign) down to 0; those TAPS bits address the LUT.
//
// Interface and timing: in_ready is high when idle. A sample is taken on a
// rising edge with in_valid and in_ready high; it is shifted into t[0]. The
// next DATA_W cycles run the DA loop (in_ready low). In the cycle after the
// last step out_valid pulses for one cycle with
//   y_out = sum_k c[k] * x[n-k],
// i.e. y_out appears DATA_W+1 cycles after the sample is taken, and a new
// sample can be taken in that same cycle: one output every DATA_W+1 cycles.
// y_out is the accumulator register itself: it is the filter output while
// out_valid is high and stays there until the next sample is taken; during
// the DA loop it shows the running partial sum. The LUT and shift-accumulator follow
// the description; tap order, MSB-first processing, the handshake and the
// reset are this design's choices.
module fir_da
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
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [OUT_W-1:0]  y_out,
  output logic                     out_valid
);

  localparam int LUT_W = COEF_W + $clog2(TAPS);
  localparam int CNT_W = $clog2(DATA_W);

  logic signed [DATA_W-1:0] t [TAPS];
  logic                     busy;
  logic [CNT_W-1:0]         bit_idx;
  logic [TAPS-1:0]          addr;
  logic signed [LUT_W-1:0]  lut_data;
  logic                     last;

  assign in_ready = !busy;
  assign last     = (bit_idx == '0);

  // Bit slice across the taps addresses the LUT.
  always_comb begin
    for (int k = 0; k < TAPS; k++) addr[k] = t[k][bit_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) t[k] <= '0;
      busy      <= 1'b0;
      bit_idx   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= busy && last;
      if (!busy) begin
        if (in_valid) begin
          t[0] <= x_in;
          for (int k = 1; k < TAPS; k++) t[k] <= t[k-1];
          busy    <= 1'b1;
          bit_idx <= CNT_W'(DATA_W - 1);
        end
      end else if (last) begin
        busy <= 1'b0;
      end else begin
        bit_idx <= bit_idx - 1'b1;
      end
    end
  end

  da_lut #(.COEF_W(COEF_W), .TAPS(TAPS), .COEFS(COEFS), .LUT_W(LUT_W)) u_lut (
    .addr(addr), .data(lut_data)
  );

  logic first_step;
  assign first_step = (bit_idx == CNT_W'(DATA_W - 1));

  da_accumulator #(.LUT_W(LUT_W), .ACC_W(OUT_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (busy),
    .first (first_step),
    .sub   (first_step && X_SIGNED),   // sign bit has weight -2^(DATA_W-1)
    .lut_in(lut_data),
    .acc   (y_out)
  );

endmodule
