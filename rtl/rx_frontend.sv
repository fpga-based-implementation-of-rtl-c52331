// Receive front end shared by the option 1/2 and option 3 detectors.
//
// Chain: LMS6002D I/Q de-interleaver -> 8-tap matched filter on I and on Q
// -> carrier and phase recovery (DPLL around a rotation CORDIC) -> early-
// late gate timing recovery -> hard chip decisions. A vectoring CORDIC on
// the carrier-corrected samples reports the signal magnitude (energy
// detection) and its residual phase. oqpsk selects how the timing recovery
// forms chips: I/Q pairs offset by half a symbol (option 3) or I only
// (option 1/2).
//
// All stages advance on the sample enable from the de-interleaver, one
// sample every two clocks. The receive rate is RX_SPS = 8 samples per
// I-branch symbol (4 per chip in option 3, 8 per chip in option 1/2), so the
// 8-tap matched filter spans one half-sine pulse. en low clears the carrier
// and timing loops.
module rx_frontend #(
  parameter int unsigned RX_SPS = 8,
  parameter int unsigned STAGES = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               oqpsk,
  input  logic signed [11:0] adc_iq,
  input  logic               adc_iqsel,
  output logic               chip_valid,
  output logic               chip_i,
  output logic               chip_q,
  output logic               ted_adv,
  output logic               ted_ret,
  output logic signed [15:0] theta,
  output logic        [16:0] ed_mag,
  output logic signed [15:0] ed_phase
);
  logic signed [11:0] ri, rq, mi, mq;
  logic               s_ce;
  logic signed [17:0] yi, yq, pd_i, pd_q;
  logic               pd_stb_i, pd_stb_q;

  iq_demux #(.W(12)) u_demux (
    .clk, .rst_n, .iq(adc_iq), .iqsel(adc_iqsel), .i_out(ri), .q_out(rq), .sample_ce(s_ce));

  fir_filter u_mf_i (.clk, .rst_n, .ce(s_ce), .d(ri), .q(mi));
  fir_filter u_mf_q (.clk, .rst_n, .ce(s_ce), .d(rq), .q(mq));

  carrier_recovery #(.STAGES(STAGES), .IN_W(12)) u_cpr (
    .clk, .rst_n, .clear(!en), .ce(s_ce), .oqpsk, .pd_stb_i, .pd_stb_q, .pd_i, .pd_q,
    .xi(mi), .xq(mq), .yi, .yq, .theta);

  cordic_vectoring #(.STAGES(STAGES), .W(16)) u_ed (
    .clk, .rst_n, .ce(s_ce), .x_in(16'(yi >>> 2)), .y_in(16'(yq >>> 2)),
    .mag(ed_mag), .phase(ed_phase));

  timing_recovery #(.SPS(RX_SPS), .W(18)) u_ted (
    .clk, .rst_n, .clear(!en), .ce(s_ce), .oqpsk, .yi, .yq,
    .chip_valid, .chip_i, .chip_q, .adv(ted_adv), .ret(ted_ret),
    .pd_stb_i, .pd_stb_q, .pd_i, .pd_q);
endmodule
