// cic_integrator: the recursive (IIR) half of a CIC decimator.
//
// ORDER accumulators in cascade, all running at the input sample rate, give
// the (1/(1-z^-1))^ORDER factor of the sinc transfer function. Each stage is
// registered: on a cycle with clk_enable high, acc[0] <= acc[0] + din and
// acc[i] <= acc[i] + acc[i-1]. The sums wrap around in two's complement; that
// is intended (the comb section that follows undoes the wrap as long as WIDTH
// holds the final CIC output range).
//
// Interface: din (IN_W bits, signed) is sampled when clk_enable is high;
// dout is the last accumulator. Timing: with the registered cascade, dout
// after input n equals the ORDER-fold running sum of the input up to sample
// n-(ORDER-1). reset is asynchronous and active high and clears all sums.
// The structure (integrators at the input rate) follows the published block
// diagram; registering every stage and the reset style are this design's
// choices.
module cic_integrator #(
  parameter int unsigned ORDER = 4,
  parameter int unsigned IN_W  = 2,
  parameter int unsigned WIDTH = 14
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [WIDTH-1:0] dout
);

  logic signed [WIDTH-1:0] acc [ORDER];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < ORDER; i++) acc[i] <= '0;
    end else if (clk_enable) begin
      acc[0] <= acc[0] + WIDTH'(din);
      for (int i = 1; i < ORDER; i++) acc[i] <= acc[i] + acc[i-1];
    end
  end

  assign dout = acc[ORDER-1];

endmodule
