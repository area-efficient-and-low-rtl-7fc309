// cic_decimator: one sinc (cascaded integrator-comb) decimation stage.
//
// Computes H(z) = ((1 - z^-M) / (1 - z^-1))^L and keeps one output in M:
// integrators at the input rate, a down-sampler, then combs at the output
// rate. The down-sampler is a modulo-M counter of enabled input cycles; on
// the M-th input of each group it passes the integrator output (as it stands
// after that input's update has propagated, see below) to the comb section.
//
// Word width: OUT_W = IN_W + L*log2(M) holds the full output range, so the
// wrapping integrator sums are exact after the combs. The default (M = 8,
// L = 4, 2-bit input) gives 14 bits.
//
// Interface: din is sampled when clk_enable is high (one input sample per
// enabled cycle). dout/ce_out: ce_out pulses for one cycle with each new
// output. Timing: output k is the sinc-filtered input evaluated at input
// index (k+1)*M-1-(L-1), i.e. the registered integrators add L-1 samples of
// delay, and it appears one clock after the enabled cycle that completes a
// group of M inputs. Reset is asynchronous, active high. An assertion checks
// that ce_out is a single-cycle pulse.
// M and L come from the published design; the registered integrators, the
// counter and the reset style are this design's choices.
module cic_decimator #(
  parameter int unsigned M     = 8,
  parameter int unsigned L     = 4,
  parameter int unsigned IN_W  = 2,
  parameter int unsigned OUT_W = IN_W + L * $clog2(M)
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  filter_in,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    ce_out
);

  localparam int unsigned CNT_W = (M > 1) ? $clog2(M) : 1;

  logic signed [OUT_W-1:0] integ_out;
  logic [CNT_W-1:0]        cnt;
  logic                    last_in_group;
  logic                    take;           // integrator output is the group's sample

  cic_integrator #(.ORDER(L), .IN_W(IN_W), .WIDTH(OUT_W)) u_integ (
    .clk        (clk),
    .reset      (reset),
    .clk_enable (clk_enable),
    .din        (filter_in),
    .dout       (integ_out)
  );

  assign last_in_group = (cnt == CNT_W'(M - 1));

  // The integrators update at the end of the enabled cycle, so the sample to
  // keep is visible one clock later: 'take' marks that clock.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      cnt  <= '0;
      take <= 1'b0;
    end else begin
      take <= clk_enable && last_in_group;
      if (clk_enable) cnt <= last_in_group ? '0 : cnt + 1'b1;
    end
  end

  cic_comb #(.ORDER(L), .WIDTH(OUT_W)) u_comb (
    .clk        (clk),
    .reset      (reset),
    .clk_enable (take),
    .din        (integ_out),
    .dout       (filter_out),
    .ce_out     (ce_out)
  );

  // Handshake rule: with M > 1 an output strobe is never followed directly by
  // another one.
  if (M > 1) begin : g_rate_check
    a_ce_single: assert property (@(posedge clk) ce_out |=> !ce_out)
      else $error("cic_decimator: ce_out high on two consecutive cycles");
  end

endmodule
