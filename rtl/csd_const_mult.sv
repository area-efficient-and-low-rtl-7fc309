// csd_const_mult: multiply a signed sample by a constant, without a multiplier.
//
// The constant COEF is recoded at elaboration into canonical signed digit
// (CSD) form: digits in {-1, 0, +1}, no two adjacent digits non-zero, which
// has the fewest non-zero digits of any signed-digit form. The product is then
// the sum of (x << i) for each +1 digit minus (x << i) for each -1 digit, one
// adder or subtractor per non-zero digit beyond the first. Recoding: while the
// remaining value n is non-zero, if n is odd the digit is +1 when n mod 4 = 1
// and -1 when n mod 4 = 3, that digit is subtracted, and n is halved.
//
// Interface: purely combinational, x (IN_W bits) to y (OUT_W bits), both two's
// complement; OUT_W must hold the full product. Using CSD shift-and-add for
// the filter coefficients follows the published design; this module's form is
// this design's own.
module csd_const_mult #(
  parameter int          COEF  = 79676,
  parameter int unsigned IN_W  = 21,
  parameter int unsigned OUT_W = 40
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam int unsigned NDIG = 34;  // enough digits for any 32-bit constant

  // Bit i set: CSD digit i is +1 (want_neg = 0) or -1 (want_neg = 1).
  function automatic logic [NDIG-1:0] csd_digits(input longint c, input bit want_neg);
    logic [NDIG-1:0] mask;
    longint          n;
    mask = '0;
    n    = c;
    for (int i = 0; i < NDIG; i++) begin
      if ((n & 64'sd1) != 0) begin
        if ((n & 64'sd3) == 64'sd1) begin
          if (!want_neg) mask[i] = 1'b1;
          n = n - 1;
        end else begin
          if (want_neg) mask[i] = 1'b1;
          n = n + 1;
        end
      end
      n = n >>> 1;
    end
    return mask;
  endfunction

  localparam logic [NDIG-1:0] POS = csd_digits(longint'(COEF), 1'b0);
  localparam logic [NDIG-1:0] NEG = csd_digits(longint'(COEF), 1'b1);

  logic signed [OUT_W-1:0] xw;

  assign xw = OUT_W'(x);

  always_comb begin
    y = '0;
    for (int i = 0; i < NDIG; i++) begin
      if (POS[i]) y = y + (xw <<< i);
      if (NEG[i]) y = y - (xw <<< i);
    end
  end

endmodule
