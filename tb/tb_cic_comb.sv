// tb_cic_comb: checks the cascade of first differences.
//
// Output k must be sum_i (-1)^i C(ORDER,i) d[k-i] reduced to WIDTH bits, where
// d is the sequence of enabled inputs (zero before reset). ce_out must pulse
// exactly one cycle after each enabled cycle and never otherwise.
module tb_cic_comb;
  import decim_ref_pkg::*;

  localparam int ORDER = 4;
  localparam int WIDTH = 14;
  localparam int NIN   = 2000;

  logic clk = 0, reset = 0, clk_enable = 0;
  initial #1 reset = 1;  // an edge, so the asynchronous reset acts
  logic signed [WIDTH-1:0] din = '0;
  logic signed [WIDTH-1:0] dout;
  logic ce_out;
  int checks = 0, failures = 0;
  q_t ds, w;

  always #5 clk = ~clk;

  cic_comb #(.ORDER(ORDER), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // (1 - z^-1)^ORDER coefficients
    automatic longint c = 1;
    for (int i = 0; i <= ORDER; i++) begin
      w.push_back((i % 2 != 0) ? -c : c);
      c = c * (ORDER - i) / (i + 1);
    end
    repeat (3) @(posedge clk);
    reset = 0;
    for (int k = 0; k < NIN; k++) begin
      automatic int gap = $urandom_range(0, 2);
      for (int g = 0; g < gap; g++) begin
        @(negedge clk); clk_enable = 0;
        @(posedge clk); #1;
        checks++;
        if (ce_out) begin failures++; $display("ce_out without input"); end
      end
      @(negedge clk);
      clk_enable = 1;
      din = WIDTH'($urandom);
      ds.push_back(longint'(din));
      @(posedge clk); #1;
      checks++;
      if (!ce_out) begin failures++; $display("k=%0d missing ce_out", k); end
      begin
        automatic longint exp_v = wrap(fir_at(ds, w, k), WIDTH);
        checks++;
        if (longint'(dout) != exp_v) begin
          failures++;
          if (failures < 10) $display("k=%0d dout=%0d exp=%0d", k, dout, exp_v);
        end
      end
      @(negedge clk); clk_enable = 0;
      @(posedge clk); #1;
      checks++;
      if (ce_out) begin failures++; $display("ce_out longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
