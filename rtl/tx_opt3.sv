// IEEE 802.15.4 option 3 transmitter (O-QPSK, 2.4 GHz band).
//
// Chain, with the rates at a 4 Msample/s output: bit to symbol (32-bit words
// to 4-bit symbols, 62.5 ksymbol/s) -> symbol to 32 chips (2 Mchip/s) ->
// O-QPSK mapping (even chips on I, odd on Q, 1 Msymbol/s per branch) ->
// upsampling x4 -> half-sine pulse shaping on each branch -> 12-bit samples.
// Because Q chips come one chip period after I chips, the Q pulses are
// offset by half an O-QPSK symbol.
//
// Interface as tx_opt12: frame words (whole PPDU) by valid/ready while ce is
// high; 12-bit I/Q samples with a sample_ce strobe every CLK_PER_SAMPLE
// clocks, also interleaved on dac_iq/dac_iqsel; busy while a frame is sent.
//
// Timing: counters and serializer update on the enable edges; the DSP
// stages run one clock later. The rates and widths follow the transmitter
// block diagram; the half-sine taps 2047*sin(pi*k/4) are this design's.
module tx_opt3 #(
  parameter int unsigned CLK_PER_SAMPLE = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [31:0]        in_data,
  output logic signed [11:0] i_out,
  output logic signed [11:0] q_out,
  output logic               sample_ce,
  output logic signed [11:0] dac_iq,
  output logic               dac_iqsel,
  output logic               busy
);
  localparam logic [4*12-1:0] HS_COEFS = {12'sd1448, 12'sd2047, 12'sd1448, 12'sd0};

  logic s_ce, c_ce, y_ce;
  logic s_ce_d, c_ce_d;
  logic sym_valid, chip, chip_odd;
  logic [3:0] sym;
  logic i_stb, q_stb;
  logic signed [3:0] i_amp, q_amp, i_ups, q_ups;

  tx_clock_gen #(.CLK_PER_SAMPLE(CLK_PER_SAMPLE), .SAMPLES_PER_CHIP(2),
                 .CHIPS_PER_SYMBOL(32)) u_clk (
    .clk, .rst_n, .en(ce), .sample_ce(s_ce), .chip_ce(c_ce), .symbol_ce(y_ce));

  tx_serializer #(.OUT_W(4)) u_b2s (
    .clk, .rst_n, .clear(!ce), .in_valid, .in_ready, .in_data,
    .shift_ce(y_ce), .out_valid(sym_valid), .out_data(sym));

  symbol_to_chip u_s2c (
    .clk, .rst_n, .symbol_ce(y_ce), .chip_ce(c_ce), .symbol(sym), .chip, .chip_odd);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_ce_d <= 1'b0;
      c_ce_d <= 1'b0;
    end else begin
      s_ce_d <= s_ce;
      c_ce_d <= c_ce;
    end
  end

  oqpsk_map u_map (
    .chip_stb(c_ce_d && sym_valid), .chip, .chip_odd,
    .i_stb, .q_stb, .i_sym(i_amp), .q_sym(q_amp));

  upsampler #(.W(4)) u_ups_i (.clk, .rst_n, .sample_ce(s_ce_d), .stb(i_stb), .d(i_amp), .q(i_ups));
  upsampler #(.W(4)) u_ups_q (.clk, .rst_n, .sample_ce(s_ce_d), .stb(q_stb), .d(q_amp), .q(q_ups));

  fir_filter #(.NTAPS(4), .IN_W(4), .OUT_W(12), .COEF_W(12), .SHIFT(0),
               .COEFS(HS_COEFS)) u_pulse_i (
    .clk, .rst_n, .ce(s_ce_d), .d(i_ups), .q(i_out));
  fir_filter #(.NTAPS(4), .IN_W(4), .OUT_W(12), .COEF_W(12), .SHIFT(0),
               .COEFS(HS_COEFS)) u_pulse_q (
    .clk, .rst_n, .ce(s_ce_d), .d(q_ups), .q(q_out));

  // The filter outputs are registered on s_ce_d; the interleaver takes
  // them on the next sample strobe.
  iq_mux #(.W(12)) u_iqmux (
    .clk, .rst_n, .sample_ce(s_ce_d), .i_in(i_out), .q_in(q_out), .iq(dac_iq), .iqsel(dac_iqsel));

  assign sample_ce = s_ce_d;
  assign busy      = sym_valid;
endmodule
