// tb_fir_top: end-to-end self-check of fir_top at its default parameters
// (8-bit samples, the four default coefficients). A random sample stream is
// offered with random gaps; the shift-register filter's output is checked the
// cycle after every accepted sample, the DA filter's output when it reports
// it, both against a convolution computed here, and the two must agree. The
// MAC ports are driven in parallel with random products, accumulations and
// clears and checked against a reference sum every cycle.
// Mechanisms counted, each must occur: a sample accepted, a sample held off
// while the DA filter is busy, a DA result whose sign-bit step subtracts a
// non-zero table word, a Booth digit of -1 in a multiplier whose output is
// used (negative coefficient on a non-zero tap), a MAC accumulation onto a
// non-zero sum, and a MAC clear.
module tb_fir_top;
  localparam int B = 8;
  localparam int C [4] = '{-5, 37, 37, -5};
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic signed [7:0] x_in = '0;
  logic signed [17:0] sr_y, da_y;
  logic sr_valid, da_valid;
  logic mac_valid = 0, mac_clear = 0;
  logic signed [7:0] mac_x = '0, mac_y = '0;
  logic signed [19:0] mac_acc, mac_model;
  int checks = 0, failures = 0;
  int hist [4];
  int n_take = 0, n_holdoff = 0, n_da_out = 0, n_sign_sub = 0, n_booth_neg = 0;
  int n_mac_acc = 0, n_mac_clear = 0;
  int cyc = 0, take_cyc = 0;

  fir_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .x_in(x_in),
    .sr_y(sr_y), .sr_valid(sr_valid), .da_y(da_y), .da_valid(da_valid),
    .mac_valid(mac_valid), .mac_clear(mac_clear), .mac_x(mac_x), .mac_y(mac_y),
    .mac_acc(mac_acc));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv();
    int e = 0;
    for (int k = 0; k < 4; k++) e += C[k] * hist[k];
    return e;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    bit took;
    foreach (hist[k]) hist[k] = 0;
    mac_model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_da_out < 5000) begin
      @(negedge clk);
      // sample stream
      in_valid = ($urandom_range(0, 2) != 0);
      x_in = 8'($urandom);
      took = in_valid && in_ready;
      if (took) begin
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        take_cyc = cyc;
        n_take++;
      end else if (in_valid) n_holdoff++;
      // MAC
      mac_valid = ($urandom_range(0, 3) != 0);
      mac_clear = ($urandom_range(0, 31) == 0);
      mac_x = 8'($urandom);
      mac_y = 8'($urandom);
      if (mac_valid) begin
        if (!mac_clear && mac_model != 0) n_mac_acc++;
        mac_model = (mac_clear ? '0 : mac_model) + 20'(mac_x * mac_y);
      end else if (mac_clear) mac_model = '0;
      if (mac_clear) n_mac_clear++;
      @(posedge clk); #1;
      checks++;
      if (mac_acc !== mac_model) fail($sformatf("mac_acc=%0d expected %0d", mac_acc, mac_model));
      checks++;
      if (sr_valid !== took) fail("sr_valid does not follow the accepted sample");
      if (sr_valid) begin
        checks++;
        if (int'(sr_y) != conv()) fail($sformatf("sr_y=%0d expected %0d", sr_y, conv()));
        if ((hist[0] != 0 || hist[3] != 0)) n_booth_neg++;
      end
      if (da_valid) begin
        int msb_word;
        n_da_out++;
        checks += 3;
        if (int'(da_y) != conv()) fail($sformatf("da_y=%0d expected %0d", da_y, conv()));
        if (da_y !== sr_y) fail("the two filters disagree");
        if (cyc - take_cyc != B + 1) fail($sformatf("DA latency %0d", cyc - take_cyc));
        msb_word = 0;
        for (int k = 0; k < 4; k++) if (hist[k] < 0) msb_word += C[k];
        if (msb_word != 0) n_sign_sub++;
      end
    end
    checks++;
    if (n_take == 0 || n_holdoff == 0 || n_sign_sub == 0 || n_booth_neg == 0 ||
        n_mac_acc == 0 || n_mac_clear == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("accepted %0d, held off %0d, DA results %0d, sign-bit subtractions %0d",
             n_take, n_holdoff, n_da_out, n_sign_sub);
    $display("Booth -1 digits used %0d, MAC accumulations %0d, MAC clears %0d",
             n_booth_neg, n_mac_acc, n_mac_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
