// tb_cic_decimator: checks one sinc decimation stage (M = 8, L = 4).
//
// Reference: direct convolution of the input with the boxcar^L impulse
// response. Output k must equal that convolution at input index
// (k+1)*M - L (the registered integrators delay by L-1 samples). Also
// checked: one output per M enabled inputs, ce_out exactly two clocks after
// the enabled cycle carrying the M-th input of a group, and a full-scale
// constant input settling to the DC gain M**L. Inputs are +-1 with random
// idle cycles.
module tb_cic_decimator;
  import decim_ref_pkg::*;

  localparam int M     = 8;
  localparam int L     = 4;
  localparam int IN_W  = 2;
  localparam int OUT_W = IN_W + L * $clog2(M);
  localparam int NIN   = 4000;

  logic clk = 0, reset = 0, clk_enable = 0;
  initial #1 reset = 1;  // an edge, so the asynchronous reset acts
  logic signed [IN_W-1:0]  filter_in = '0;
  logic signed [OUT_W-1:0] filter_out;
  logic ce_out;
  int checks = 0, failures = 0;
  q_t xs, h;
  int nout = 0;
  longint cycle = 0, last_group_cycle = -100;

  always #5 clk = ~clk;

  cic_decimator #(.M(M), .L(L), .IN_W(IN_W)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (clk_enable && !reset && (xs.size() % M == 0) && xs.size() > 0)
      last_group_cycle <= cycle;
    if (ce_out) begin
      longint exp_v;
      exp_v = fir_at(xs, h, (nout + 1) * M - L);
      checks++;
      if (longint'(filter_out) != exp_v) begin
        failures++;
        if (failures < 10) $display("k=%0d out=%0d exp=%0d", nout, filter_out, exp_v);
      end
      checks++;
      if (cycle != last_group_cycle + 2) begin
        failures++;
        $display("k=%0d latency %0d, expected 2", nout, cycle - last_group_cycle);
      end
      nout++;
    end
  end

  initial begin
    h = sinc_taps(M, L);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < NIN; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        clk_enable = 0;
        @(negedge clk);
      end
      clk_enable = 1;
      filter_in = (n >= 2000 && n < 2400) ? 2'sd1 : (($urandom_range(0, 1) != 0) ? 2'sd1 : -2'sd1);
      xs.push_back(longint'(filter_in));
      if (n == 2399) begin
        @(negedge clk); clk_enable = 0;
        repeat (3) @(negedge clk);
        checks++;
        if (longint'(filter_out) != longint'(M) ** L) begin
          failures++;
          $display("full-scale output %0d, expected %0d", filter_out, longint'(M) ** L);
        end
      end
    end
    @(negedge clk) clk_enable = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nout != NIN / M) begin
      failures++;
      $display("outputs %0d, expected %0d", nout, NIN / M);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
