// Loop filter and phase accumulator of the second-order DPLL.
//
// Proportional-integral filter: on each ce the integrator adds KI * e and
// the filter output is v = KP * e + integrator. The phase accumulator (the
// z^-1 and adder in front of the rotation CORDIC) adds v, and its upper 16
// bits are the estimated phase theta (full circle = 2^16). The accumulator
// keeps 16 fractional bits so small gains still move the phase.
// zeroes the integrator and the phase.
// Gains are parameters because the loop bandwidth and damping depend on
// them; the defaults (KP = 512, KI = 1 at about 8 samples per chip) are this
// design's choice.
module dpll_loop_filter #(
  parameter int          EW = 16,
  parameter int unsigned KP = 512,
  parameter int unsigned KI = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 ce,
  input  logic signed [EW-1:0] e,
  output logic signed [15:0]   theta
);
  logic signed [31:0] integ, v, acc;

  assign v     = 32'(e) * $signed(32'(KP)) + integ;
  assign theta = acc[31:16];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      integ <= '0;
      acc   <= '0;
    end else if (ce) begin
      integ <= integ + 32'(e) * $signed(32'(KI));
      acc   <= acc + v;
    end
  end
endmodule
