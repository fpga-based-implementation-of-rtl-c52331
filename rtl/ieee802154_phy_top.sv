// IEEE 802.15.4 multi-PHY baseband: options 1/2 (BPSK) and 3 (O-QPSK).
//
// Transmit side: frame words from the host go to the option 1/2 and the
// option 3 transmitter; only the enabled one takes them. A hardware switch
// passes the enabled transmitter's interleaved I/Q bus to the DAC.
// Receive side: the ADC bus feeds one shared front end (matched filters,
// carrier recovery, timing recovery), whose chips go to the option 1/2 and
// option 3 detectors; a second hardware switch passes the enabled
// detector's PSDU bytes to the host. The HW-RECONF controller takes the
// host's option-selection word and drives all enables and both switches.
// Options 1 and 2 are the same logic at different clock frequencies.
//
// Interfaces: clk is the baseband clock, twice the converter sample rate;
// rst_n is synchronous, active low. cfg_* is the reconfiguration command
// channel; tx_* is the frame-word FIFO channel (valid/ready, whole PPDU
// LSB first); dac_* and adc_* are the 12-bit interleaved converter buses
// (iqsel = 1 marks I); rx_* carries the received PSDU bytes with sof/eof.
// Status outputs report the selected option, the receiver state and the
// energy-detection magnitude.
module ieee802154_phy_top
  import ieee802154_pkg::*;
#(
  parameter int unsigned TX_CLK_PER_SAMPLE = 2,
  parameter int unsigned RX_SPS            = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_valid,
  input  logic [31:0]        cfg_data,
  input  logic               tx_valid,
  output logic               tx_ready,
  input  logic [31:0]        tx_data,
  output logic signed [11:0] dac_iq,
  output logic               dac_iqsel,
  output logic               tx_busy,
  input  logic signed [11:0] adc_iq,
  input  logic               adc_iqsel,
  output logic               rx_valid,
  output logic [7:0]         rx_data,
  output logic               rx_sof,
  output logic               rx_eof,
  output logic               opt3_sel,
  output logic [1:0]         rx_state,
  output logic [16:0]        ed_mag
);
  phy_opt_e opt_sel;
  logic tx_opt12_ce, tx_opt3_ce, tx_switch_ce, rx_opt12_ce, rx_opt3_ce, rx_switch_ce;
  logic switched;

  hw_reconf u_reconf (
    .clk, .rst_n, .cfg_valid, .cfg_data, .opt_sel,
    .tx_opt12_ce, .tx_opt3_ce, .tx_switch_ce, .rx_opt12_ce, .rx_opt3_ce, .rx_switch_ce,
    .switched);

  assign opt3_sel = (opt_sel == PHY_OPT3);

  // ---------------- transmit ----------------
  logic               rdy12, rdy3, busy12, busy3, sce12, sce3;
  logic signed [11:0] i12, q12, i3, q3, dac12, dac3;
  logic               sel12, sel3;

  tx_opt12 #(.CLK_PER_SAMPLE(TX_CLK_PER_SAMPLE)) u_tx12 (
    .clk, .rst_n, .ce(tx_opt12_ce), .in_valid(tx_valid && tx_opt12_ce), .in_ready(rdy12),
    .in_data(tx_data), .i_out(i12), .q_out(q12), .sample_ce(sce12),
    .dac_iq(dac12), .dac_iqsel(sel12), .busy(busy12));

  tx_opt3 #(.CLK_PER_SAMPLE(TX_CLK_PER_SAMPLE)) u_tx3 (
    .clk, .rst_n, .ce(tx_opt3_ce), .in_valid(tx_valid && tx_opt3_ce), .in_ready(rdy3),
    .in_data(tx_data), .i_out(i3), .q_out(q3), .sample_ce(sce3),
    .dac_iq(dac3), .dac_iqsel(sel3), .busy(busy3));

  assign tx_ready = opt3_sel ? rdy3 : rdy12;
  assign tx_busy  = busy12 | busy3;

  hw_switch #(.W(13)) u_tx_switch (
    .clk, .rst_n, .ce(tx_switch_ce), .sel(opt3_sel),
    .a({sel12, dac12}), .b({sel3, dac3}), .y({dac_iqsel, dac_iq}));

  // ---------------- receive ----------------
  logic chip_valid, chip_i, chip_q, ted_adv, ted_ret;
  logic signed [15:0] theta, ed_phase;
  logic [1:0] st12, st3;
  logic pre12, sfd12, pre3, sfd3;
  logic bv12, sof12, eof12, bv3, sof3, eof3;
  logic [7:0] bd12, bd3;

  rx_frontend #(.RX_SPS(RX_SPS)) u_rxfe (
    .clk, .rst_n, .en(rx_opt12_ce || rx_opt3_ce), .oqpsk(opt3_sel),
    .adc_iq, .adc_iqsel, .chip_valid, .chip_i, .chip_q,
    .ted_adv, .ted_ret, .theta, .ed_mag, .ed_phase);

  decoder_opt12 u_dec12 (
    .clk, .rst_n, .en(rx_opt12_ce), .chip_valid, .chip_i,
    .state(st12), .pre_det(pre12), .sfd_det(sfd12),
    .byte_valid(bv12), .byte_data(bd12), .sof(sof12), .eof(eof12));

  decoder_opt3 u_dec3 (
    .clk, .rst_n, .en(rx_opt3_ce), .chip_valid, .chip_i, .chip_q,
    .state(st3), .pre_det(pre3), .sfd_det(sfd3),
    .byte_valid(bv3), .byte_data(bd3), .sof(sof3), .eof(eof3));

  hw_switch #(.W(11)) u_rx_switch (
    .clk, .rst_n, .ce(rx_switch_ce), .sel(opt3_sel),
    .a({bv12, sof12, eof12, bd12}), .b({bv3, sof3, eof3, bd3}),
    .y({rx_valid, rx_sof, rx_eof, rx_data}));

  assign rx_state = opt3_sel ? st3 : st12;
endmodule
