// tb_decimation_filter: end-to-end test of the whole chain at its default size.
//
// Stimulus: a first-order sigma-delta modulator, modelled behaviourally here,
// turns a sine of amplitude 0.5 full scale and period 2048 input samples
// (1 kHz at a 2.048 MHz modulator rate) into a 1-bit stream; clk_enable is
// dropped at random to stall the input. 300 output samples are taken.
//
// Checks:
//   - every output against a reference chain built from the filter
//     definitions (sinc 8x4th order, sinc 4x3rd order, HB1, HB2 by direct
//     convolution, rounding and saturation as specified);
//   - every decimation step happens at its rate: outputs of the first sinc
//     stage, the sinc pair, HB1 and HB2 count N/8, N/32, N/64 and N/128;
//   - the recovered sine, after the filter has settled, peaks within 2 % of
//     0.5 * 2**18 (the 1 kHz tone is in the passband);
//   - stalls (clk_enable low) happened.
module tb_decimation_filter;
  import decim_ref_pkg::*;
  import decim_pkg::*;

  localparam int NOUT = 300;
  localparam int NIN  = 128 * NOUT;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, reset = 0, clk_enable = 0;
  initial #1 reset = 1;  // an edge, so the asynchronous reset acts
  logic filter_in = 0;
  logic signed [DATA_W-1:0] filter_out;
  logic ce_out;
  logic [2:0] stage_ce;

  int checks = 0, failures = 0;
  int n_stall = 0, n_s1 = 0, n_s2 = 0, n_hb1 = 0, n_hb2 = 0;
  longint peak = 0;
  q_t xs, y1, y2, y3, h1, h2, hh1, hh2, c;

  always #5 clk = ~clk;

  decimation_filter dut (.*);

  initial begin
    repeat (NIN * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // convolution at index n using only the window that matters
  function automatic longint conv(q_t x, q_t h, int n);
    int lo;
    q_t win;
    lo = n - h.size() + 1;
    if (lo < 0) lo = 0;
    win = x[lo:n];
    return fir_at(win, h, n - lo);
  endfunction

  always @(posedge clk) begin
    if (!reset) begin
      if (stage_ce[0]) n_s1++;
      if (stage_ce[1])   n_s2++;
      if (stage_ce[2])   n_hb1++;
    end
    if (ce_out) begin
      longint exp_v;
      int need3, need2, need1;
      need3 = 2 * n_hb2 + 1;
      need2 = 2 * need3 + 1;
      need1 = 4 * (need2 + 1) - 3;
      while (y1.size() <= need1) y1.push_back(conv(xs, h1, 8 * (y1.size() + 1) - 4));
      while (y2.size() <= need2) y2.push_back(conv(y1, h2, 4 * (y2.size() + 1) - 3));
      while (y3.size() <= need3)
        y3.push_back(round_sat(conv(y2, hh1, 2 * y3.size() + 1), COEF_FRAC, DATA_W));
      exp_v = round_sat(conv(y3, hh2, 2 * n_hb2 + 1), COEF_FRAC, DATA_W);
      checks++;
      if (longint'(filter_out) != exp_v) begin
        failures++;
        if (failures < 10) $display("p=%0d out=%0d exp=%0d", n_hb2, filter_out, exp_v);
      end
      if (n_hb2 >= 100 && filter_out > peak) peak = filter_out;
      n_hb2++;
    end
  end

  initial begin
    real integ, u;
    integ = 0.0;
    h1 = sinc_taps(CIC1_M, CIC1_L);
    h2 = sinc_taps(CIC2_M, CIC2_L);
    c = {};
    for (int k = 0; k < HB1_K; k++) c.push_back(longint'(HB1_COEFS[k]));
    hh1 = halfband_taps(c, COEF_FRAC);
    c = {};
    for (int k = 0; k < HB2_K; k++) c.push_back(longint'(HB2_COEFS[k]));
    hh2 = halfband_taps(c, COEF_FRAC);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < NIN; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 15) == 0) begin
        clk_enable = 0;
        n_stall++;
        @(negedge clk);
      end
      clk_enable = 1;
      // first-order sigma-delta: integrate input minus fed-back output
      u = 0.5 * $sin(2.0 * PI * real'(n) / 2048.0);
      filter_in = (integ >= 0.0);
      integ = integ + u - (filter_in ? 1.0 : -1.0);
      xs.push_back(filter_in ? 64'sd1 : -64'sd1);
    end
    @(negedge clk) clk_enable = 0;
    repeat (8) @(negedge clk);

    checks++;
    if (n_s1 != NIN / 8)   begin failures++; $display("sinc1 outputs %0d", n_s1); end
    checks++;
    if (n_s2 != NIN / 32)  begin failures++; $display("sinc2 outputs %0d", n_s2); end
    checks++;
    if (n_hb1 != NIN / 64) begin failures++; $display("HB1 outputs %0d", n_hb1); end
    checks++;
    if (n_hb2 != NIN / 128) begin failures++; $display("HB2 outputs %0d", n_hb2); end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall happened"); end
    checks++;
    if (peak < 128450 || peak > 133694) begin
      failures++;
      $display("sine peak %0d, expected about 131072", peak);
    end
    $display("decimations: sinc1 %0d, sinc2 %0d, HB1 %0d, HB2 %0d; stalls %0d; sine peak %0d",
             n_s1, n_s2, n_hb1, n_hb2, n_stall, peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
