// Detector of the option 3 (O-QPSK) receiver.
//
// Chip pairs (I, Q hard decisions) from the timing recovery feed two
// sliding complex correlators over one byte of chips: one against a
// preamble byte (symbols 0, 0), one against the SFD byte 0xA7 (symbols 7,
// then 10). The FSM starts in preamble search, moves to SFD search on a
// preamble hit and, once the SFD correlation passes its threshold, knows
// where every following 32-chip symbol starts. For each symbol the last 16
// pairs of the SFD correlator's window form the block given to the bank of
// 16 symbol correlators, whose comparator tree returns the symbol index.
// Symbols are packed into bytes, the PHY header is read and the PSDU bytes
// leave with sof/eof.
//
// Thresholds on |C|^2 are parameters: full scale is 64^2 = 4096, and 2500
// tolerates about seven wrong chips of 64. Their values are this design's
// choice. en low clears the detector.
module decoder_opt3
  import ieee802154_pkg::*;
#(
  parameter int unsigned PRE_THR     = 2500,
  parameter int unsigned SFD_THR     = 2500,
  parameter int unsigned SFD_TIMEOUT = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       chip_valid,
  input  logic       chip_i,
  input  logic       chip_q,
  output logic [1:0] state,
  output logic       pre_det,
  output logic       sfd_det,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       sof,
  output logic       eof
);
  localparam logic [0:31] S7  = opt3_seq(4'd7);
  localparam logic [0:31] S10 = opt3_seq(4'd10);

  logic pre_v, sfd_v, pre_neg, sfd_neg;
  logic [15:0] pre_m2, sfd_m2;
  logic [0:31] pre_wi, pre_wq, sfd_wi, sfd_wq;
  logic blk_start, sym_valid;
  logic [3:0] sym;
  logic [11:0] best;

  chip_correlator #(.N(32), .COMPLEX(1'b1)) u_pre (
    .clk, .rst_n, .clear(!en), .ce(chip_valid), .ci(chip_i), .cq(chip_q),
    .valid(pre_v), .mag2(pre_m2), .neg(pre_neg), .win_i(pre_wi), .win_q(pre_wq));

  chip_correlator #(.N(32), .COMPLEX(1'b1),
                    .REF_I({opt3_even(S7), opt3_even(S10)}),
                    .REF_Q({opt3_odd(S7), opt3_odd(S10)})) u_sfd (
    .clk, .rst_n, .clear(!en), .ce(chip_valid), .ci(chip_i), .cq(chip_q),
    .valid(sfd_v), .mag2(sfd_m2), .neg(sfd_neg), .win_i(sfd_wi), .win_q(sfd_wq));

  assign pre_det = pre_v && (pre_m2 >= 16'(PRE_THR)) && (state == 2'd0);
  assign sfd_det = sfd_v && (sfd_m2 >= 16'(SFD_THR)) && (state == 2'd1);

  symbol_bank #(.CW(12)) u_bank (
    .clk, .rst_n, .start(blk_start),
    .blk_i(sfd_wi[16:31]), .blk_q(sfd_wq[16:31]),
    .valid(sym_valid), .symbol(sym), .best);

  decoder_fsm #(.BITS_PER_SYM(4), .CHIPS_PER_SYM(16), .SFD_TIMEOUT(SFD_TIMEOUT)) u_fsm (
    .clk, .rst_n, .en, .chip_valid, .pre_hit(pre_det), .sfd_hit(sfd_det),
    .sym_valid, .sym, .state, .blk_start, .byte_valid, .byte_data, .sof, .eof);
endmodule
