// cic_comb: the non-recursive (FIR) half of a CIC decimator.
//
// ORDER first-difference stages in cascade, running at the decimated rate.
// One delay at the low rate equals M delays at the input rate, so the cascade
// realises the (1-z^-M)^ORDER factor of the sinc transfer function. On a cycle
// with clk_enable high each stage computes d[i] = d[i-1] - z[i] and stores its
// input in z[i]; the differences of one sample ripple through all stages in
// that cycle and the result is registered into dout.
//
// Interface: din and dout are WIDTH bits, two's complement, wrapping. ce_out
// pulses for one cycle together with each new dout, one clock after the
// enabled cycle. reset (asynchronous, active high) clears the delays, dout
// and ce_out. The structure follows the published block diagram; the single
// output register and reset style are this design's choices.
module cic_comb #(
  parameter int unsigned ORDER = 4,
  parameter int unsigned WIDTH = 14
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [WIDTH-1:0] din,
  output logic signed [WIDTH-1:0] dout,
  output logic                    ce_out
);

  logic signed [WIDTH-1:0] z    [ORDER];   // one low-rate delay per stage
  logic signed [WIDTH-1:0] diff [ORDER+1]; // diff[0] = din, diff[i+1] = stage i output

  always_comb begin
    diff[0] = din;
    for (int i = 0; i < ORDER; i++) diff[i+1] = diff[i] - z[i];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < ORDER; i++) z[i] <= '0;
      dout   <= '0;
      ce_out <= 1'b0;
    end else begin
      ce_out <= clk_enable;
      if (clk_enable) begin
        for (int i = 0; i < ORDER; i++) z[i] <= diff[i];
        dout <= diff[ORDER];
      end
    end
  end

endmodule
