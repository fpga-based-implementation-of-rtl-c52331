// One symbol correlator of the symbol bank.
//
// Correlates a block of N hard chip pairs (blk_i/blk_q, NRZ 1 = +1) with a
// reference sequence (ref_i/ref_q) as in the preamble correlator:
// C = sum_k conj(r_k) y_k. With SQUARE = 1 the output is |C|^2
// (phase-independent, used by the O-QPSK bank); with SQUARE = 0 it is the
// signed real part offset by its largest magnitude, Re + N*(1+COMPLEX), so
// that a larger output still means a better match (used by the BPSK bank,
// where a sequence and its inverse must be told apart). Combinational;
// the comparator stage after it registers the value. OW = 12 bits for the
// 32-chip bank follows the bank drawing.
module symbol_correlator #(
  parameter int unsigned N       = 16,
  parameter bit          COMPLEX = 1'b1,
  parameter bit          SQUARE  = 1'b1,
  parameter int unsigned OW      = 12
) (
  input  logic [0:N-1]  blk_i,
  input  logic [0:N-1]  blk_q,
  input  logic [0:N-1]  ref_i,
  input  logic [0:N-1]  ref_q,
  output logic [OW-1:0] corr
);
  localparam int SW = $clog2(2 * N + 1) + 1;
  logic signed [SW-1:0] re, im;

  always_comb begin
    re = '0;
    im = '0;
    for (int k = 0; k < N; k++) begin
      re += (ref_i[k] == blk_i[k]) ? SW'(1) : -SW'(1);
      if (COMPLEX) begin
        re += (ref_q[k] == blk_q[k]) ? SW'(1) : -SW'(1);
        im += (ref_i[k] == blk_q[k]) ? SW'(1) : -SW'(1);
        im -= (ref_q[k] == blk_i[k]) ? SW'(1) : -SW'(1);
      end
    end
    if (SQUARE) corr = OW'(re * re) + OW'(im * im);
    else        corr = OW'(re + SW'(COMPLEX ? 2 * N : N));
  end
endmodule
