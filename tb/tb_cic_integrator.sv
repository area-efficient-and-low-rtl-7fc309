// tb_cic_integrator: checks the cascade of accumulators against closed form.
//
// After input n the registered cascade of ORDER accumulators holds the
// ORDER-fold running sum of the input up to sample n-(ORDER-1), which in
// closed form is sum_j C(j+ORDER-1, ORDER-1) * x[m-j] (binomial weights),
// reduced to WIDTH bits. Random +-1 inputs with random idle cycles are
// driven; every enabled cycle is checked, and idle cycles must hold dout.
module tb_cic_integrator;
  import decim_ref_pkg::*;

  localparam int ORDER = 4;
  localparam int IN_W  = 2;
  localparam int WIDTH = 14;
  localparam int NIN   = 3000;

  logic clk = 0, reset = 0, clk_enable = 0;
  initial #1 reset = 1;  // an edge, so the asynchronous reset acts
  logic signed [IN_W-1:0]  din = '0;
  logic signed [WIDTH-1:0] dout;
  int checks = 0, failures = 0;
  q_t xs, w;

  always #5 clk = ~clk;

  cic_integrator #(.ORDER(ORDER), .IN_W(IN_W), .WIDTH(WIDTH)) dut (.*);

  function automatic longint binom(int n, int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic signed [WIDTH-1:0] held;
    for (int j = 0; j < NIN; j++) w.push_back(binom(j + ORDER - 1, ORDER - 1));
    repeat (3) @(posedge clk);
    reset = 0;
    for (int n = 0; n < NIN; n++) begin
      // occasional idle cycles: output must not move
      if ($urandom_range(0, 3) == 0) begin
        held = dout;
        @(negedge clk); clk_enable = 0;
        @(posedge clk); #1;
        checks++;
        if (dout !== held) begin failures++; $display("idle cycle changed dout"); end
      end
      @(negedge clk);
      clk_enable = 1;
      // mostly +1 for a while to force wrap-around, then random
      din = (n < 1000) ? (($urandom_range(0, 9) < 9) ? 2'sd1 : -2'sd1)
                       : (($urandom_range(0, 1) != 0) ? 2'sd1 : -2'sd1);
      xs.push_back(longint'(din));
      @(posedge clk); #1;
      begin
        automatic longint exp_v = wrap(fir_at(xs, w, n - (ORDER - 1)), WIDTH);
        checks++;
        if (longint'(dout) != exp_v) begin
          failures++;
          if (failures < 10) $display("n=%0d dout=%0d exp=%0d", n, dout, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
