// da_lut: distributed-arithmetic look-up table.
//
// For a TAPS-bit address a (bit k = one bit of the sample in tap k) it returns
//   lut(a) = sum over k with a[k] = 1 of c[k]
// i.e. the inner sum of the DA reformulation
//   y = sum_b 2^b * sum_k c[k] * x_b[k].
// The 2^TAPS entries are computed from the coefficient parameter when the
// design is elaborated and held as a constant array (a ROM; with four taps it
// is one 4-input LUT per output bit). Output width grows by ceil(log2(TAPS))
// bits over the coefficient width so no sum overflows.
//
// Interface: combinational read, addr -> data.
module da_lut
#(
  parameter int COEF_W = fir_pkg::DEF_COEF_W,
  parameter int TAPS   = fir_pkg::DEF_TAPS,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = fir_pkg::DEFAULT_COEFS,
  parameter int LUT_W  = COEF_W + $clog2(TAPS)
) (
  input  logic [TAPS-1:0]         addr,
  output logic signed [LUT_W-1:0] data
);

  typedef logic signed [LUT_W-1:0] entry_t;
  typedef entry_t table_t [2**TAPS];

  function automatic table_t build_table();
    table_t tbl;
    for (int a = 0; a < 2**TAPS; a++) begin
      tbl[a] = '0;
      for (int k = 0; k < TAPS; k++)
        if (a[k]) tbl[a] = tbl[a] + entry_t'(COEFS[k]);
    end
    return tbl;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];

endmodule
