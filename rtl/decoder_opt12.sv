// Detector of the option 1/2 (BPSK) receiver.
//
// Same structure as the O-QPSK detector, on real chips. Two sliding
// correlators span one byte of chips (8 bits x 15 chips = 120): the
// preamble byte 0x00 and the SFD byte 0xA7, both as they look after
// differential encoding and spreading. Their outputs are squared, so a
// 180-degree carrier ambiguity does not hide them. After the SFD, each
// 15-chip block goes to a bank of two symbol correlators (the sequence of
// bit 0 and its inverse) with signed outputs; the comparator picks the
// encoded bit. The differential decoder then outputs bit = e(n) xor
// e(n-1); its state starts from the encoder state after the SFD, flipped
// when the SFD correlation came out negative (inverted carrier), so the
// data come out right either way. Bits are packed LSB first into bytes by
// the FSM. Thresholds (full scale 120^2 = 14400) are this design's choice.
module decoder_opt12
  import ieee802154_pkg::*;
#(
  parameter int unsigned PRE_THR     = 8000,
  parameter int unsigned SFD_THR     = 8000,
  parameter int unsigned SFD_TIMEOUT = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       chip_valid,
  input  logic       chip_i,
  output logic [1:0] state,
  output logic       pre_det,
  output logic       sfd_det,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       sof,
  output logic       eof
);
  localparam logic [0:119] PRE_CHIPS = opt12_byte_chips(PREAMBLE_BYTE, 1'b0);
  localparam logic [0:119] SFD_CHIPS = opt12_byte_chips(SFD_BYTE, 1'b0);
  localparam logic         SFD_STATE = opt12_byte_state(SFD_BYTE, 1'b0);

  logic pre_v, sfd_v, pre_neg, sfd_neg;
  logic [17:0] pre_m2, sfd_m2;
  logic [0:119] pre_wi, pre_wq, sfd_wi, sfd_wq;
  logic blk_start, blk_d, sym_valid;
  logic [4:0] c0, c1, best;
  logic e_hat, prev, bit_out;

  chip_correlator #(.N(120), .COMPLEX(1'b0), .REF_I(PRE_CHIPS), .REF_Q('0)) u_pre (
    .clk, .rst_n, .clear(!en), .ce(chip_valid), .ci(chip_i), .cq(1'b0),
    .valid(pre_v), .mag2(pre_m2), .neg(pre_neg), .win_i(pre_wi), .win_q(pre_wq));

  chip_correlator #(.N(120), .COMPLEX(1'b0), .REF_I(SFD_CHIPS), .REF_Q('0)) u_sfd (
    .clk, .rst_n, .clear(!en), .ce(chip_valid), .ci(chip_i), .cq(1'b0),
    .valid(sfd_v), .mag2(sfd_m2), .neg(sfd_neg), .win_i(sfd_wi), .win_q(sfd_wq));

  assign pre_det = pre_v && (pre_m2 >= 18'(PRE_THR)) && (state == 2'd0);
  assign sfd_det = sfd_v && (sfd_m2 >= 18'(SFD_THR)) && (state == 2'd1);

  // Bank of two 15-chip correlators and one comparator.
  symbol_correlator #(.N(15), .COMPLEX(1'b0), .SQUARE(1'b0), .OW(5)) u_c0 (
    .blk_i(sfd_wi[105:119]), .blk_q('0), .ref_i(OPT12_SEQ0), .ref_q('0), .corr(c0));
  symbol_correlator #(.N(15), .COMPLEX(1'b0), .SQUARE(1'b0), .OW(5)) u_c1 (
    .blk_i(sfd_wi[105:119]), .blk_q('0), .ref_i(~OPT12_SEQ0), .ref_q('0), .corr(c1));
  max_comparator #(.VW(5), .IW(1)) u_cmp (
    .clk, .rst_n, .ce(blk_start), .a_val(c0), .a_idx(1'b0), .b_val(c1), .b_idx(1'b1),
    .y_val(best), .y_idx(e_hat));

  // Differential decoder.
  assign bit_out   = e_hat ^ prev;
  assign sym_valid = blk_d;
  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      prev  <= 1'b0;
      blk_d <= 1'b0;
    end else begin
      blk_d <= blk_start;
      if (sfd_det)    prev <= SFD_STATE ^ sfd_neg;
      else if (blk_d) prev <= e_hat;
    end
  end

  decoder_fsm #(.BITS_PER_SYM(1), .CHIPS_PER_SYM(15), .SFD_TIMEOUT(SFD_TIMEOUT)) u_fsm (
    .clk, .rst_n, .en, .chip_valid, .pre_hit(pre_det), .sfd_hit(sfd_det),
    .sym_valid, .sym(bit_out), .state, .blk_start, .byte_valid, .byte_data, .sof, .eof);
endmodule
