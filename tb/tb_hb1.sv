// tb_hb1: checks halfband_decimator configured as the first half-band filter (HB1, 15 taps).
//
// Reference: the full length-(4K-1) impulse response is rebuilt from the K
// distinct taps (centre 1/2, zeros at the other even offsets) and convolved
// directly with the input; output m uses input 2m+1 as its newest sample and
// is rounded half-up from 2**-18 units and saturated to 20 bits. Inputs:
// random values, a unit impulse (the output then reads back the impulse
// response), a DC level, and worst-case sign patterns that force saturation
// both ways. Also checked: one output per two inputs, ce_out one clock after
// the enabled cycle of the second input of a pair, and saturation happening.
module tb_hb1;
  import decim_ref_pkg::*;
  import decim_pkg::*;

  localparam int K     = HB1_K;
  localparam int W     = 20;
  localparam int NIN   = 3000;

  logic clk = 0, reset = 0, clk_enable = 0;
  initial #1 reset = 1;  // an edge, so the asynchronous reset acts
  logic signed [W-1:0] filter_in = '0;
  logic signed [W-1:0] filter_out;
  logic ce_out;
  int checks = 0, failures = 0, n_sat = 0;
  q_t xs, h, c;
  int nout = 0;
  longint cycle = 0, last_pair_cycle = -100;

  always #5 clk = ~clk;

  halfband_decimator #(.K(K), .COEFS(HB1_COEFS), .COEF_FRAC(COEF_FRAC), .IN_W(W), .OUT_W(W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (clk_enable && !reset && xs.size() % 2 == 0 && xs.size() > 0) last_pair_cycle <= cycle;
    if (ce_out) begin
      longint full, exp_v;
      full  = fir_at(xs, h, 2 * nout + 1);
      exp_v = round_sat(full, COEF_FRAC, W);
      if (exp_v != ((full + (longint'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC)) n_sat++;
      checks++;
      if (longint'(filter_out) != exp_v) begin
        failures++;
        if (failures < 10) $display("m=%0d out=%0d exp=%0d", nout, filter_out, exp_v);
      end
      checks++;
      if (cycle != last_pair_cycle + 1) begin
        failures++;
        if (failures < 10) $display("m=%0d latency %0d, expected 1", nout, cycle - last_pair_cycle);
      end
      nout++;
    end
  end

  task automatic put(longint v);
    @(negedge clk);
    if ($urandom_range(0, 5) == 0) begin
      clk_enable = 0;
      @(negedge clk);
    end
    clk_enable = 1;
    filter_in = W'(v);
    xs.push_back(v);
  endtask

  initial begin
    for (int k = 0; k < K; k++) c.push_back(longint'(HB1_COEFS[k]));
    h = halfband_taps(c, COEF_FRAC);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // unit impulse scaled so every tap shows: out = round(h[j] * 2**18 / 2**18)
    put(262144);
    for (int i = 0; i < 4 * K + 2; i++) put(0);
    for (int i = 0; i < 200; i++) put(-100000);
    for (int n = xs.size(); n < NIN; n++) begin
      if (n >= 2000 && n < 2200) begin
        // newest sample lands on input 2m+1: sign pattern of the taps, +- full scale
        automatic int pos = (4 * K - 1) - 1 - ((n - 2000) % (4 * K));
        automatic longint s = (pos >= 0 && pos < 4 * K - 1 && h[pos] < 0) ? -1 : 1;
        if (((n - 2000) / (4 * K)) % 2 == 1) s = -s;
        put(s * 524287);
      end else begin
        put($signed($urandom_range(0, 2 * 300000)) - 300000);
      end
    end
    @(negedge clk) clk_enable = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (nout != xs.size() / 2) begin
      failures++;
      $display("outputs %0d, expected %0d", nout, xs.size() / 2);
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
