// Direct-form FIR filter with constant coefficients.
//
// On each ce the input enters a tap delay line and the output register takes
// sum_k COEF_k * x(n-k), shifted right by SHIFT and saturated to OUT_W bits.
// The output is therefore valid from the edge of the ce that took x(n).
// Coefficients come packed in COEFS, tap k in bits [k*COEF_W +: COEF_W].
//
// The design uses it three ways: the option 3 half-sine pulse shaper
// (taps 2047*sin(pi*k/4), k = 0..3), the option 1/2 raised-cosine pulse
// shaper (roll-off 1, 4 samples per chip, +-1 chip) and the 8-tap receive
// matched filter, which is the default: half-sine taps
// 2047*sin(pi*(k+0.5)/8), k = 0..7. Tap values and scaling are this
// design's choice; the tap count of 8 follows the receiver.
module fir_filter #(
  parameter int unsigned NTAPS  = 8,
  parameter int unsigned IN_W   = 12,
  parameter int unsigned OUT_W  = 12,
  parameter int unsigned COEF_W = 12,
  parameter int unsigned SHIFT  = 14,
  parameter logic [NTAPS*COEF_W-1:0] COEFS =
    {12'sd399, 12'sd1137, 12'sd1702, 12'sd2008, 12'sd2008, 12'sd1702, 12'sd1137, 12'sd399}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic signed [IN_W-1:0]  d,
  output logic signed [OUT_W-1:0] q
);
  localparam int AW = IN_W + COEF_W + $clog2(NTAPS) + 1;
  localparam logic signed [AW-1:0] MAXV = AW'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(64'sd1 <<< (OUT_W - 1));

  logic signed [IN_W-1:0] x [NTAPS];
  logic signed [AW-1:0]   acc, scaled;

  always_comb begin
    acc = AW'(d) * AW'($signed(COEFS[0 +: COEF_W]));
    for (int k = 1; k < NTAPS; k++)
      acc += AW'(x[k-1]) * AW'($signed(COEFS[k*COEF_W +: COEF_W]));
    scaled = acc >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) x[k] <= '0;
      q <= '0;
    end else if (ce) begin
      x[0] <= d;
      for (int k = 1; k < NTAPS; k++) x[k] <= x[k-1];
      if (scaled > MAXV)      q <= MAXV[OUT_W-1:0];
      else if (scaled < MINV) q <= MINV[OUT_W-1:0];
      else                    q <= scaled[OUT_W-1:0];
    end
  end
endmodule
