// Sliding chip correlator with squared-magnitude output (preamble / SFD).
//
// Hard chip decisions (1 bit, NRZ: 1 = +1, 0 = -1) enter two shift registers
// of N chips, one for I and one for Q. Each new chip pair is correlated with
// a constant reference of one byte of chips:
//   C = sum_k conj(r_k) * y_k,   r_k = REF_I[k] + j REF_Q[k],
// and the block outputs |C|^2 = Re^2 + Im^2, which does not depend on the
// carrier phase. With COMPLEX = 0 only the I chips are used (BPSK) and
// |C|^2 = Re^2. neg is the sign of Re, used by the BPSK decoder to resolve
// the 180-degree ambiguity.
//
// Timing: the window shifts on the edge of ce; mag2/neg are combinational
// from the window and valid is high on the following cycle. win_i/win_q
// expose the window (index N-1 is the newest chip) so that a decoder can
// take its last symbol block from it. The reference default is one
// preamble byte of the O-QPSK PHY (two symbol-0 sequences).
module chip_correlator
  import ieee802154_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter bit          COMPLEX = 1'b1,
  parameter logic [0:N-1] REF_I  = {opt3_even(OPT3_SEQ0), opt3_even(OPT3_SEQ0)},
  parameter logic [0:N-1] REF_Q  = {opt3_odd(OPT3_SEQ0), opt3_odd(OPT3_SEQ0)},
  localparam int SW = $clog2(2 * N + 1) + 1,
  localparam int MW = 2 * SW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          ce,
  input  logic          ci,
  input  logic          cq,
  output logic          valid,
  output logic [MW-1:0] mag2,
  output logic          neg,
  output logic [0:N-1]  win_i,
  output logic [0:N-1]  win_q
);
  logic signed [SW-1:0] re, im;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      win_i <= '0;
      win_q <= '0;
      valid <= 1'b0;
    end else begin
      valid <= ce;
      if (ce) begin
        win_i <= {win_i[1:N-1], ci};
        win_q <= {win_q[1:N-1], COMPLEX ? cq : 1'b0};
      end
    end
  end

  always_comb begin
    re = '0;
    im = '0;
    for (int k = 0; k < N; k++) begin
      re += (REF_I[k] == win_i[k]) ? SW'(1) : -SW'(1);
      if (COMPLEX) begin
        re += (REF_Q[k] == win_q[k]) ? SW'(1) : -SW'(1);
        im += (REF_I[k] == win_q[k]) ? SW'(1) : -SW'(1);
        im -= (REF_Q[k] == win_i[k]) ? SW'(1) : -SW'(1);
      end
    end
    mag2 = MW'(re * re) + MW'(im * im);
    neg  = re[SW-1];
  end
endmodule
