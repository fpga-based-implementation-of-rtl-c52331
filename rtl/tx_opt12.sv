// IEEE 802.15.4 option 1/2 transmitter (BPSK, 868/915 MHz bands).
//
// Chain: 32-to-1 serializer -> differential encoder -> bit to 15 chips ->
// BPSK mapping -> zero-insertion upsampling (4 samples per chip) ->
// raised-cosine pulse shaping. Option 1 (300 kchip/s) and option 2
// (600 kchip/s) share this IP: only the clock frequency differs.
//
// Interface: frame words (the whole PPDU: preamble, SFD, PHR, PSDU) come in
// with a valid/ready handshake while ce is high. Samples leave on i_out/q_out
// (12-bit signed, q_out always zero) with a one-cycle sample_ce strobe every
// CLK_PER_SAMPLE clocks, and interleaved on the converter bus dac_iq/dac_iqsel. busy is high while a frame is being sent. Dropping
// ce stops and clears the chain.
//
// Timing: the symbol/chip counters and serializer update on the enable
// edges; the DSP stages run one clock later (sample strobe delayed by one
// cycle) so that they see the updated chip. Samples per chip and the filter
// taps are this design's choices.
module tx_opt12 #(
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
  localparam int unsigned SPC = 4;
  // Raised cosine, roll-off 1, 4 samples per chip, +-1 chip span, scaled so
  // two overlapping pulses stay below 2047.
  localparam logic [7*12-1:0] RC_COEFS =
    {12'sd331, 12'sd973, 12'sd1651, 12'sd1946, 12'sd1651, 12'sd973, 12'sd331};

  logic s_ce, c_ce, b_ce;
  logic s_ce_d, c_ce_d;
  logic bit_valid, bit_raw, bit_enc, chip;
  logic signed [3:0] amp, ups;

  tx_clock_gen #(.CLK_PER_SAMPLE(CLK_PER_SAMPLE), .SAMPLES_PER_CHIP(SPC),
                 .CHIPS_PER_SYMBOL(15)) u_clk (
    .clk, .rst_n, .en(ce), .sample_ce(s_ce), .chip_ce(c_ce), .symbol_ce(b_ce));

  tx_serializer #(.OUT_W(1)) u_serdes (
    .clk, .rst_n, .clear(!ce), .in_valid, .in_ready, .in_data,
    .shift_ce(b_ce), .out_valid(bit_valid), .out_data(bit_raw));

  diff_encoder u_diff (
    .clk, .rst_n, .clear(!ce || !bit_valid), .ce(b_ce && bit_valid),
    .d(bit_raw), .e(bit_enc));

  bit_to_chip u_spread (
    .clk, .rst_n, .symbol_ce(b_ce), .chip_ce(c_ce), .bit_in(bit_enc), .chip);

  bpsk_map u_map (.chip, .sym(amp));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_ce_d <= 1'b0;
      c_ce_d <= 1'b0;
    end else begin
      s_ce_d <= s_ce;
      c_ce_d <= c_ce;
    end
  end

  upsampler #(.W(4)) u_ups (
    .clk, .rst_n, .sample_ce(s_ce_d), .stb(c_ce_d && bit_valid), .d(amp), .q(ups));

  fir_filter #(.NTAPS(7), .IN_W(4), .OUT_W(12), .COEF_W(12), .SHIFT(0),
               .COEFS(RC_COEFS)) u_pulse (
    .clk, .rst_n, .ce(s_ce_d), .d(ups), .q(i_out));

  assign q_out     = '0;
  // The filter outputs are registered on s_ce_d; the interleaver takes
  // them on the next sample strobe.
  iq_mux #(.W(12)) u_iqmux (
    .clk, .rst_n, .sample_ce(s_ce_d), .i_in(i_out), .q_in(q_out), .iq(dac_iq), .iqsel(dac_iqsel));

  assign sample_ce = s_ce_d;
  assign busy      = bit_valid;
endmodule
