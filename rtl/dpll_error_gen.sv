// Phase-error generator of the carrier-recovery DPLL.
//
// BPSK (oqpsk = 0): multiplies the in-phase and quadrature parts of the
// derotated sample, e = (y_I * y_Q) >>> SHIFT, saturated to EW bits and
// registered on every ce. For y = A e^{j phi} this is A^2 sin(2 phi) / 2:
// zero at lock and signed with the phase error.
// O-QPSK (oqpsk = 1): the plain product has no restoring force on an
// offset-QPSK signal, so the error is taken only at the chip instants given
// by the timing recovery: sign(I) * Q at an I instant (where the Q pulse
// crosses zero) and -sign(Q) * I at a Q instant, both |A| sin(phi), shifted
// left by DD_SHL to match the loop gain of the BPSK case. Between instants
// e is zero. The multiplier of the block diagram is kept for BPSK; the
// O-QPSK variant and all scaling are this design's choice.
module dpll_error_gen #(
  parameter int unsigned W     = 18,
  parameter int unsigned EW    = 16,
  parameter int unsigned SHIFT = 10,
  parameter int unsigned DD_SHL = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 oqpsk,
  input  logic signed [W-1:0]  yi,
  input  logic signed [W-1:0]  yq,
  input  logic                 pd_stb_i,
  input  logic                 pd_stb_q,
  input  logic signed [W-1:0]  pd_i,
  input  logic signed [W-1:0]  pd_q,
  output logic signed [EW-1:0] e
);
  localparam logic signed [2*W-1:0] MAXV = (2*W)'((64'sd1 <<< (EW - 1)) - 1);
  localparam logic signed [2*W-1:0] MINV = -(2*W)'(64'sd1 <<< (EW - 1));

  logic signed [2*W-1:0] prod, scaled, dd;

  always_comb begin
    prod   = yi * yq;
    scaled = prod >>> SHIFT;
    if (pd_stb_i) dd = pd_i[W-1] ? -(2*W)'(pd_q) : (2*W)'(pd_q);
    else          dd = pd_q[W-1] ? (2*W)'(pd_i) : -(2*W)'(pd_i);
    dd = dd <<< DD_SHL;
  end

  function automatic logic signed [EW-1:0] sat(input logic signed [2*W-1:0] v);
    if (v > MAXV)      return MAXV[EW-1:0];
    else if (v < MINV) return MINV[EW-1:0];
    else               return v[EW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) e <= '0;
    else if (oqpsk) begin
      // The strobes come on the cycle after a sample enable; the value is
      // consumed by the loop filter on the next enable and then cleared.
      if (pd_stb_i || pd_stb_q) e <= sat(dd);
      else if (ce)              e <= '0;
    end else if (ce) begin
      e <= sat(scaled);
    end
  end
endmodule
