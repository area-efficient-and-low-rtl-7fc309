// tb_frequency_response: checks the frequency-domain behaviour of the stages.
//
// 1. Sinc cascade (module cic). Its response ((1-z^-8)/(1-z^-1))^4 *
//    ((1-z^-32)/(1-z^-8))^3 is zero at every multiple of 1/32 of the input
//    rate except DC. Any 1-bit pattern repeating every 32 (or 16) inputs has
//    all its energy at those frequencies plus DC, so after settling the
//    output must be exactly constant at mean(+-1 pattern) * 2**18.
// 2. Half-band filters HB1 and HB2 (module halfband_decimator). Sine inputs of
//    amplitude 200000 at chosen frequencies; the output amplitude is measured
//    by a 256-point DFT over whole periods after the filter has settled.
//    Passband tones must come out within 0.01 dB of the input level and
//    stopband tones at least 78 dB down (the coefficients were designed for
//    81-82 dB). Frequencies are given as k/512 of the input rate
//    (HB1: 64 kHz in, k*125 Hz; HB2: 32 kHz in, k*62.5 Hz).
module tb_frequency_response;
  import decim_pkg::*;

  localparam real PI   = 3.14159265358979;
  localparam int  NW   = 256;     // DFT length in output samples
  localparam real AMP  = 200000.0;

  logic clk = 0, reset = 0;
  initial #1 reset = 1;  // an edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- sinc cascade ----------------
  logic cic_en = 0, cic_in = 0;
  logic signed [19:0] cic_out;
  logic cic_ce, cic_s1;

  cic u_cic (
    .clk(clk), .reset(reset), .clk_enable(cic_en), .filter_in(cic_in),
    .filter_out(cic_out), .ce_out(cic_ce), .s1_ce(cic_s1)
  );

  // ---------------- half-band filters ----------------
  logic hb_en = 0;
  logic signed [19:0] hb_in = '0;
  logic signed [19:0] hb1_out, hb2_out;
  logic hb1_ce, hb2_ce;

  halfband_decimator #(.K(HB1_K), .COEFS(HB1_COEFS)) u_hb1 (
    .clk(clk), .reset(reset), .clk_enable(hb_en), .filter_in(hb_in),
    .filter_out(hb1_out), .ce_out(hb1_ce)
  );
  halfband_decimator #(.K(HB2_K), .COEFS(HB2_COEFS)) u_hb2 (
    .clk(clk), .reset(reset), .clk_enable(hb_en), .filter_in(hb_in),
    .filter_out(hb2_out), .ce_out(hb2_ce)
  );

  real y1 [$], y2 [$];
  int n_s1 = 0, n_c = 0;
  always @(posedge clk) begin
    if (cic_s1) n_s1 <= n_s1 + 1;
    if (cic_ce) n_c <= n_c + 1;
    if (hb1_ce) y1.push_back(real'(hb1_out));
    if (hb2_ce) y2.push_back(real'(hb2_out));
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk) reset = 1;
    @(negedge clk) reset = 0;
  endtask

  // pattern of 'period' bits, 'ones' of them set, repeated; output must settle
  task automatic cic_pattern(int period, int ones);
    int nout, settled, bad;
    longint expv;
    logic signed [19:0] o;
    expv = (longint'(2 * ones) - longint'(period)) * 262144 / longint'(period);
    do_reset();
    nout = 0; bad = 0; settled = 0;
    for (int n = 0; n < 32 * 40; n++) begin
      @(negedge clk);
      cic_en = 1;
      cic_in = ((n % period) < ones);
      @(posedge clk);
      #1;
      if (cic_ce) begin
        o = cic_out;
        if (nout >= 8) begin
          settled++;
          if (longint'(o) != expv) bad++;
        end
        nout++;
      end
    end
    @(negedge clk) cic_en = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (bad != 0 || settled < 20) begin
      failures++;
      $display("sinc nulls: period %0d ones %0d: %0d of %0d outputs differ from %0d",
               period, ones, bad, settled, expv);
    end
    else $display("sinc nulls: period %0d ones %0d: output constant %0d", period, ones, expv);
  endtask

  function automatic real dft_amp(real y [$], int k);
    real re, im;
    int base;
    re = 0.0; im = 0.0;
    base = y.size() - NW;
    for (int m = 0; m < NW; m++) begin
      re += y[base + m] * $cos(2.0 * PI * real'(k * m) / real'(NW));
      im -= y[base + m] * $sin(2.0 * PI * real'(k * m) / real'(NW));
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(NW);
  endfunction

  // tone at k/512 of the input rate into both half-band filters
  task automatic hb_tone(int k, bit pass1, bit stop1, bit pass2, bit stop2);
    real a1, a2, g1, g2;
    do_reset();
    y1.delete(); y2.delete();
    for (int n = 0; n < 2 * (NW + 60); n++) begin
      @(negedge clk);
      hb_en = 1;
      hb_in = 20'($rtoi(AMP * $cos(2.0 * PI * real'(k * n) / 512.0 + 0.3)));
    end
    @(negedge clk) hb_en = 0;
    repeat (3) @(posedge clk);
    a1 = dft_amp(y1, k);
    a2 = dft_amp(y2, k);
    g1 = 20.0 * $log10(a1 / AMP + 1.0e-12);
    g2 = 20.0 * $log10(a2 / AMP + 1.0e-12);
    $display("tone k=%0d: HB1 %8.4f dB, HB2 %8.4f dB", k, g1, g2);
    if (pass1) begin checks++; if (g1 < -0.01 || g1 > 0.01) begin failures++; $display("  HB1 passband gain off"); end end
    if (stop1) begin checks++; if (g1 > -78.0) begin failures++; $display("  HB1 stopband too weak"); end end
    if (pass2) begin checks++; if (g2 < -0.01 || g2 > 0.01) begin failures++; $display("  HB2 passband gain off"); end end
    if (stop2) begin checks++; if (g2 > -78.0) begin failures++; $display("  HB2 stopband too weak"); end end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    cic_pattern(32, 16);
    cic_pattern(32, 24);
    cic_pattern(32, 5);
    cic_pattern(16, 9);
    //          k   HB1 pass/stop  HB2 pass/stop
    checks++;
    if (n_s1 != 4 * n_c) begin failures++; $display("sinc stage rates %0d / %0d", n_s1, n_c); end
    hb_tone(  8,   1, 0,           0, 0);   // HB1  1 kHz
    hb_tone( 52,   1, 0,           0, 0);   // HB1  6.5 kHz
    hb_tone(208,   0, 1,           0, 0);   // HB1 26 kHz
    hb_tone(240,   0, 1,           0, 0);   // HB1 30 kHz
    hb_tone( 16,   0, 0,           1, 0);   // HB2  1 kHz
    hb_tone( 96,   0, 0,           1, 0);   // HB2  6 kHz
    hb_tone(160,   0, 0,           0, 1);   // HB2 10 kHz
    hb_tone(200,   0, 0,           0, 1);   // HB2 12.5 kHz
    hb_tone(240,   0, 0,           0, 1);   // HB2 15 kHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
