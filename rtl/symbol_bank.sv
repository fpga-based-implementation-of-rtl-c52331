// Bank of 16 symbol correlators with a comparator tree (O-QPSK decoder).
//
// The buffered block of 32 chips (16 I/Q pairs) is correlated in parallel
// with the 16 data-symbol sequences; each correlator gives a 12-bit |C|^2.
// A tree of 15 comparators in four registered stages (8, 4, 2, 1) keeps
// the largest value and its 4-bit index, which is the decoded symbol.
//
// Timing: the block must be stable on the start cycle; symbol and its
// correlation value appear with valid four cycles later. The tree stages
// advance every cycle, so a new block may start every cycle.
module symbol_bank
  import ieee802154_pkg::*;
#(
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [0:15]   blk_i,
  input  logic [0:15]   blk_q,
  output logic          valid,
  output logic [3:0]    symbol,
  output logic [CW-1:0] best
);
  logic [CW-1:0] v0 [16];
  logic [CW-1:0] v1 [8];
  logic [3:0]    i1 [8];
  logic [CW-1:0] v2 [4];
  logic [3:0]    i2 [4];
  logic [CW-1:0] v3 [2];
  logic [3:0]    i3 [2];
  logic [3:0]    vpipe;

  for (genvar s = 0; s < 16; s++) begin : g_corr
    localparam logic [0:31] SEQ = opt3_seq(4'(s));
    symbol_correlator #(.N(16), .COMPLEX(1'b1), .SQUARE(1'b1), .OW(CW)) u_corr (
      .blk_i, .blk_q, .ref_i(opt3_even(SEQ)), .ref_q(opt3_odd(SEQ)), .corr(v0[s]));
  end

  for (genvar c = 0; c < 8; c++) begin : g_st0
    max_comparator #(.VW(CW), .IW(4)) u_cmp (
      .clk, .rst_n, .ce(1'b1),
      .a_val(v0[2*c]), .a_idx(4'(2*c)), .b_val(v0[2*c+1]), .b_idx(4'(2*c+1)),
      .y_val(v1[c]), .y_idx(i1[c]));
  end
  for (genvar c = 0; c < 4; c++) begin : g_st1
    max_comparator #(.VW(CW), .IW(4)) u_cmp (
      .clk, .rst_n, .ce(1'b1),
      .a_val(v1[2*c]), .a_idx(i1[2*c]), .b_val(v1[2*c+1]), .b_idx(i1[2*c+1]),
      .y_val(v2[c]), .y_idx(i2[c]));
  end
  for (genvar c = 0; c < 2; c++) begin : g_st2
    max_comparator #(.VW(CW), .IW(4)) u_cmp (
      .clk, .rst_n, .ce(1'b1),
      .a_val(v2[2*c]), .a_idx(i2[2*c]), .b_val(v2[2*c+1]), .b_idx(i2[2*c+1]),
      .y_val(v3[c]), .y_idx(i3[c]));
  end
  max_comparator #(.VW(CW), .IW(4)) u_st3 (
    .clk, .rst_n, .ce(1'b1),
    .a_val(v3[0]), .a_idx(i3[0]), .b_val(v3[1]), .b_idx(i3[1]),
    .y_val(best), .y_idx(symbol));

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[2:0], start};
  end
  assign valid = vpipe[3];
endmodule
