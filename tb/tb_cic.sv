// tb_cic: checks the two-stage sinc front end (8 x 4th order, then 4 x 3rd order).
//
// Reference: the input bits as +-1, convolved with the boxcar^4 (length 8)
// response and sampled at indices 8(k+1)-4, then the result convolved with
// the boxcar^3 (length 4) response and sampled at 4(j+1)-3. Every output is
// compared; also checked are one output per 32 enabled inputs and, with an
// all-ones stretch, the full-scale value 8**4 * 4**3 = 2**18.
module tb_cic;
  import decim_ref_pkg::*;

  localparam int NIN = 32 * 300;

  logic clk = 0, reset = 0, clk_enable = 0;
  initial #1 reset = 1;  // an edge, so the asynchronous reset acts
  logic filter_in = 0;
  logic signed [19:0] filter_out;
  logic ce_out;
  logic s1_ce;
  int n_s1 = 0;
  int checks = 0, failures = 0;
  q_t xs, h1, h2, y1;
  int nout = 0;

  always #5 clk = ~clk;

  cic dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    checks++;
    if (n_s1 != NIN / 8) begin
      failures++;
      $display("first-stage outputs %0d, expected %0d", n_s1, NIN / 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (s1_ce) n_s1++;
    if (ce_out) begin
      longint exp_v;
      // stage-1 outputs needed up to index 4(nout+1)-3
      while (y1.size() <= 4 * (nout + 1) - 3)
        y1.push_back(fir_at(xs, h1, 8 * (y1.size() + 1) - 4));
      exp_v = fir_at(y1, h2, 4 * (nout + 1) - 3);
      checks++;
      if (longint'(filter_out) != exp_v) begin
        failures++;
        if (failures < 10) $display("j=%0d out=%0d exp=%0d", nout, filter_out, exp_v);
      end
      nout++;
    end
  end

  initial begin
    h1 = sinc_taps(8, 4);
    h2 = sinc_taps(4, 3);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < NIN; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 6) == 0) begin
        clk_enable = 0;
        @(negedge clk);
      end
      clk_enable = 1;
      // a sine-like density pattern, then a long all-ones stretch
      if (n >= 6000 && n < 7000) filter_in = 1'b1;
      else filter_in = ($urandom_range(0, 99) < 50 + 40 * ((n / 256) % 2)) ? 1'b1 : 1'b0;
      xs.push_back(filter_in ? 64'sd1 : -64'sd1);
      if (n == 6999) begin
        @(negedge clk); clk_enable = 0;
        repeat (4) @(negedge clk);
        checks++;
        if (filter_out != 20'sd262144) begin
          failures++;
          $display("full-scale output %0d, expected 262144", filter_out);
        end
      end
    end
    @(negedge clk) clk_enable = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (nout != NIN / 32) begin
      failures++;
      $display("outputs %0d, expected %0d", nout, NIN / 32);
    end
    checks++;
    if (n_s1 != NIN / 8) begin
      failures++;
      $display("first-stage outputs %0d, expected %0d", n_s1, NIN / 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
