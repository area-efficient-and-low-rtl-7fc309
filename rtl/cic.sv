// cic: the sinc (CIC) front end of the decimation chain.
//
// Takes the 1-bit oversampled stream and lowers its rate by M1*M2 = 32 in two
// sinc stages: a 4th-order stage decimating by 8, then a 3rd-order stage
// decimating by 4. Splitting the factor keeps each sinc order low. Input bit
// 1 is taken as +1 and bit 0 as -1, so the first stage sees a 2-bit signed
// sample. Widths grow by L*log2(M) per stage: 2 -> 14 -> 20 bits at the
// defaults, so the full range +-2**18 of the DC gain 8**4 * 4**3 is held with
// no truncation.
//
// Interface: filter_in is one bit per clock with clk_enable high;
// filter_out/ce_out: a new 20-bit sample with a one-cycle ce_out pulse every
// 32 enabled inputs; s1_ce is the first stage's output strobe (every 8
// enabled inputs), brought out only for monitoring. Timing: the first stage's output follows its 8th input by
// one clock, the second stage's output follows that by one more clock.
// Reset is asynchronous, active high.
// The factors and orders follow the published design; the +-1 mapping, the
// widths and the handshake are this design's choices.
module cic #(
  parameter int unsigned M1 = decim_pkg::CIC1_M,
  parameter int unsigned L1 = decim_pkg::CIC1_L,
  parameter int unsigned M2 = decim_pkg::CIC2_M,
  parameter int unsigned L2 = decim_pkg::CIC2_L,
  parameter int unsigned W1 = decim_pkg::BIT_W + L1 * $clog2(M1),
  parameter int unsigned W2 = W1 + L2 * $clog2(M2)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_enable,
  input  logic                 filter_in,
  output logic signed [W2-1:0] filter_out,
  output logic                 ce_out,
  output logic                 s1_ce        // first-stage output strobe, for monitoring
);

  localparam int unsigned BW = decim_pkg::BIT_W;

  logic signed [BW-1:0] bit_val;
  logic signed [W1-1:0] s1_out;

  assign bit_val = filter_in ? BW'(1) : -BW'(1);

  cic_decimator #(.M(M1), .L(L1), .IN_W(BW), .OUT_W(W1)) u_sinc1 (
    .clk        (clk),
    .reset      (reset),
    .clk_enable (clk_enable),
    .filter_in  (bit_val),
    .filter_out (s1_out),
    .ce_out     (s1_ce)
  );

  cic_decimator #(.M(M2), .L(L2), .IN_W(W1), .OUT_W(W2)) u_sinc2 (
    .clk        (clk),
    .reset      (reset),
    .clk_enable (s1_ce),
    .filter_in  (s1_out),
    .filter_out (filter_out),
    .ce_out     (ce_out)
  );

endmodule
