// Carrier and phase recovery: second-order DPLL around a rotation CORDIC.
//
// The CORDIC derotates each input sample by -theta, the current phase
// estimate, and so does the work of both the phase detector and the DCO.
// The error generator multiplies I and Q of the derotated sample (BPSK) or
// forms a decision-directed error at the chip instants reported by the
// timing recovery (pd_*, O-QPSK, oqpsk = 1); the PI
// loop filter and phase accumulator turn the error into the next theta.
// Frequency and phase offsets are tracked together. The loop is closed
// around the STAGES-deep pipeline, so a phase update reaches the output
// about STAGES+3 samples later; the default gains keep the loop well inside
// its stability limit for that delay.
//
// Interface: xi/xq (matched-filter output) enter on ce; yi/yq are the
// derotated samples, valid on every ce after the pipeline has filled
// (latency STAGES+1 enables). The CORDIC gain (~1.647) is not removed.
// clear restarts the loop at theta = 0.
module carrier_recovery #(
  parameter int unsigned STAGES = 16,
  parameter int unsigned IN_W   = 12,
  parameter int unsigned KP     = 512,
  parameter int unsigned KI     = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 ce,
  input  logic                 oqpsk,
  input  logic                 pd_stb_i,
  input  logic                 pd_stb_q,
  input  logic signed [17:0]   pd_i,
  input  logic signed [17:0]   pd_q,
  input  logic signed [IN_W-1:0] xi,
  input  logic signed [IN_W-1:0] xq,
  output logic signed [17:0]   yi,
  output logic signed [17:0]   yq,
  output logic signed [15:0]   theta
);
  logic signed [15:0] e;

  cordic_rotate #(.STAGES(STAGES), .W(16)) u_rot (
    .clk, .rst_n, .ce,
    .x_in(16'(xi)), .y_in(16'(xq)), .z_in(-theta),
    .x_out(yi), .y_out(yq));

  dpll_error_gen #(.W(18), .EW(16), .SHIFT(10)) u_err (
    .clk, .rst_n, .ce, .oqpsk, .yi, .yq, .pd_stb_i, .pd_stb_q, .pd_i, .pd_q, .e);

  dpll_loop_filter #(.EW(16), .KP(KP), .KI(KI)) u_lf (
    .clk, .rst_n, .clear, .ce, .e, .theta);
endmodule
