// halfband_decimator: half-band FIR low-pass filter with decimation by 2.
//
// A half-band filter of length N = 4K-1 has a centre tap of 1/2 and, apart
// from it, non-zero taps only at odd offsets from the centre. With the
// symmetric (linear-phase) taps the output is
//   y = x[c]/2 + sum_k COEFS[k] * (x[c-(2k+1)] + x[c+(2k+1)]),  k = 0..K-1,
// where c = 2K-1 is the centre of the window. Each of the K products is a
// CSD shift-and-add constant multiplier (csd_const_mult) fed by a pre-adder;
// the centre tap is a shift. Only every second output is needed, so the sum
// is evaluated once per two input samples.
//
// Coefficients are integers scaled by 2**COEF_FRAC (see decim_pkg for the
// two sets used by the chain and how they were derived). The sum is rounded
// (add one half, arithmetic shift) and saturated to OUT_W bits.
//
// Interface: filter_in is sampled when clk_enable is high, one sample per
// enabled cycle, into a delay line of N-1 registers. Inputs are counted in
// pairs; on the second input of each pair (inputs 1, 3, 5, ... after reset)
// the window formed by that input and the delay line is summed and the result
// registered into filter_out, with ce_out high for that one following cycle.
// Output m therefore is y evaluated with the newest sample being input 2m+1.
// Reset is asynchronous, active high, and clears the delay line. An
// assertion checks that ce_out is a single-cycle pulse.
// The half-band structure, decimation by two and CSD coefficients follow the
// published design; the lengths, the coefficient values, rounding and
// saturation are this design's choices.
module halfband_decimator #(
  parameter int unsigned K         = decim_pkg::HB1_K,
  parameter int          COEFS [K] = decim_pkg::HB1_COEFS,
  parameter int unsigned COEF_FRAC = decim_pkg::COEF_FRAC,
  parameter int unsigned IN_W      = decim_pkg::DATA_W,
  parameter int unsigned OUT_W     = decim_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  filter_in,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    ce_out
);

  localparam int unsigned N      = 4 * K - 1;        // filter length
  localparam int unsigned CENTER = 2 * K - 1;        // index of the 1/2 tap
  localparam int unsigned PRE_W  = IN_W + 1;         // pre-adder width
  localparam int unsigned PROD_W = PRE_W + 20;       // |COEF| < 2**19
  localparam int unsigned ACC_W  = IN_W + COEF_FRAC + 3 + $clog2(K + 1);

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((longint'(1) <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(longint'(1) <<< (OUT_W - 1));
  localparam logic signed [ACC_W-1:0] HALF_LSB = ACC_W'(longint'(1) <<< (COEF_FRAC - 1));

  logic signed [IN_W-1:0]   dly  [N-1];   // dly[0] = previous sample
  logic signed [IN_W-1:0]   win  [N];     // win[0] = current sample
  logic signed [PRE_W-1:0]  pre  [K];
  logic signed [PROD_W-1:0] prod [K];
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  rounded;
  logic signed [OUT_W-1:0]  sat;
  logic                     odd;          // next enabled input is the 2nd of a pair

  always_comb begin
    win[0] = filter_in;
    for (int i = 1; i < N; i++) win[i] = dly[i-1];
  end

  for (genvar k = 0; k < K; k++) begin : g_tap
    assign pre[k] = PRE_W'(win[CENTER - (2*k + 1)]) + PRE_W'(win[CENTER + (2*k + 1)]);
    csd_const_mult #(.COEF(COEFS[k]), .IN_W(PRE_W), .OUT_W(PROD_W)) u_mult (
      .x (pre[k]),
      .y (prod[k])
    );
  end

  always_comb begin
    acc = ACC_W'(win[CENTER]) <<< (COEF_FRAC - 1);
    for (int k = 0; k < K; k++) acc = acc + ACC_W'(prod[k]);
    rounded = (acc + HALF_LSB) >>> COEF_FRAC;
    if (rounded > OUT_MAX)      sat = OUT_MAX[OUT_W-1:0];
    else if (rounded < OUT_MIN) sat = OUT_MIN[OUT_W-1:0];
    else                        sat = rounded[OUT_W-1:0];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < N - 1; i++) dly[i] <= '0;
      odd        <= 1'b0;
      filter_out <= '0;
      ce_out     <= 1'b0;
    end else begin
      ce_out <= clk_enable && odd;
      if (clk_enable) begin
        dly[0] <= filter_in;
        for (int i = 1; i < N - 1; i++) dly[i] <= dly[i-1];
        odd <= !odd;
        if (odd) filter_out <= sat;
      end
    end
  end

  // Handshake rule: one output per two inputs, so ce_out is never high on
  // two consecutive cycles.
  a_ce_single: assert property (@(posedge clk) ce_out |=> !ce_out)
    else $error("halfband_decimator: ce_out high on two consecutive cycles");

endmodule
