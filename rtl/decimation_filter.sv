// decimation_filter: four-stage decimator for a 1-bit sigma-delta stream.
//
// Lowers the sample rate by 128 and turns the coarse 1-bit stream into 20-bit
// samples: two sinc (CIC) stages decimating by 8 and 4 (module cic), then a
// first half-band filter with a wide transition band (HB1) and a second,
// sharp half-band filter (HB2), each decimating by 2. The sinc stages are
// multiplier-free; the half-band filters use CSD shift-and-add constants.
// Each stage runs only on the cycles its input strobe (clk_enable of the
// stage) is high, so all of them share one clock while working at their own
// sample rates: 1/8, 1/32, 1/64 and 1/128 of the input rate.
//
// Interface: one input bit per clock cycle with clk_enable high (a
// 2.048 MHz stream gives 16 kHz out). filter_out holds the latest 20-bit
// output; ce_out pulses for one cycle when it changes, once per 128 enabled
// inputs. stage_ce brings out the output strobes of the first sinc stage, the
// sinc pair and HB1 (1/8, 1/32 and 1/64 of the input rate) for monitoring the
// intermediate rates; it has no other use. Scaling: a constant all-ones input settles to +2**18 (the sinc DC
// gain 8**4 * 4**3); the half-band filters have unity DC gain. Reset is
// asynchronous, active high.
// The stage order, factors and sinc orders follow the published design,
// as do the names of the stage ports. Clocking all stages from one clock
// with enables, rather than from one clock per stage, and all widths and
// coefficient values, are this design's choices.
module decimation_filter #(
  parameter int unsigned CIC1_M = decim_pkg::CIC1_M,
  parameter int unsigned CIC1_L = decim_pkg::CIC1_L,
  parameter int unsigned CIC2_M = decim_pkg::CIC2_M,
  parameter int unsigned CIC2_L = decim_pkg::CIC2_L,
  parameter int unsigned OUT_W  = decim_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic                    filter_in,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    ce_out,
  output logic [2:0]              stage_ce    // [0] sinc 1, [1] sinc 2, [2] HB1 output strobes
);

  import decim_pkg::*;

  localparam int unsigned W1    = BIT_W + CIC1_L * $clog2(CIC1_M);
  localparam int unsigned CIC_W = W1 + CIC2_L * $clog2(CIC2_M);

  logic signed [CIC_W-1:0] cic_out;
  logic                    cic_ce;
  logic                    cic_s1_ce;
  logic signed [OUT_W-1:0] hb1_out;
  logic                    hb1_ce;

  assign stage_ce = {hb1_ce, cic_ce, cic_s1_ce};

  cic #(.M1(CIC1_M), .L1(CIC1_L), .M2(CIC2_M), .L2(CIC2_L)) c1 (
    .clk        (clk),
    .reset      (reset),
    .clk_enable (clk_enable),
    .filter_in  (filter_in),
    .filter_out (cic_out),
    .ce_out     (cic_ce),
    .s1_ce      (cic_s1_ce)
  );

  halfband_decimator #(
    .K(HB1_K), .COEFS(HB1_COEFS), .COEF_FRAC(COEF_FRAC), .IN_W(CIC_W), .OUT_W(OUT_W)
  ) c2 (
    .clk        (clk),
    .reset      (reset),
    .clk_enable (cic_ce),
    .filter_in  (cic_out),
    .filter_out (hb1_out),
    .ce_out     (hb1_ce)
  );

  halfband_decimator #(
    .K(HB2_K), .COEFS(HB2_COEFS), .COEF_FRAC(COEF_FRAC), .IN_W(OUT_W), .OUT_W(OUT_W)
  ) c3 (
    .clk        (clk),
    .reset      (reset),
    .clk_enable (hb1_ce),
    .filter_in  (hb1_out),
    .filter_out (filter_out),
    .ce_out     (ce_out)
  );

endmodule
