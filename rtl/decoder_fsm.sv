// Frame controller of a receiver's detector.
//
// States: S_PRE searches the preamble; a preamble correlation above
// threshold (pre_hit) moves to S_SFD, which waits for the SFD correlation
// (sfd_hit) and falls back to S_PRE after SFD_TIMEOUT chip periods without
// one. After the SFD the symbol blocks are aligned: every CHIPS_PER_SYM chip
// periods the FSM raises blk_start for the symbol correlator bank. Decoded
// symbols (BITS_PER_SYM bits each, LSB first) are packed into bytes. The
// first byte is the PHY header (S_PHR); its 7 low bits give the PSDU
// length. The PSDU bytes then leave on byte_valid/byte_data with sof on the
// first and eof on the last, and the FSM returns to S_PRE. A zero length
// returns at once. en low holds the FSM in S_PRE.
//
// Timing: pre_hit/sfd_hit are sampled on the cycle after the chip that
// completes the correlator window (the correlator's valid cycle);
// blk_start is raised on the cycle after the chip that completes a block,
// when the correlator window already holds it. The frame format is the
// standard's; the timeout is this design's choice.
module decoder_fsm #(
  parameter int unsigned BITS_PER_SYM  = 4,
  parameter int unsigned CHIPS_PER_SYM = 16,
  parameter int unsigned SFD_TIMEOUT   = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    chip_valid,
  input  logic                    pre_hit,
  input  logic                    sfd_hit,
  input  logic                    sym_valid,
  input  logic [BITS_PER_SYM-1:0] sym,
  output logic [1:0]              state,
  output logic                    blk_start,
  output logic                    byte_valid,
  output logic [7:0]              byte_data,
  output logic                    sof,
  output logic                    eof
);
  typedef enum logic [1:0] {S_PRE, S_SFD, S_PHR, S_DATA} state_e;
  localparam int unsigned SYMS_PER_BYTE = 8 / BITS_PER_SYM;

  state_e st;
  logic [$clog2(SFD_TIMEOUT+1)-1:0]  tmo;
  logic [$clog2(CHIPS_PER_SYM)-1:0]  ccnt;
  logic [$clog2(SYMS_PER_BYTE+1)-1:0] scnt;
  logic [7:0] shreg, nxt;
  logic [6:0] remaining;
  logic       first;

  assign state = st;
  assign nxt   = {sym, shreg[7:BITS_PER_SYM]};

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      st <= S_PRE;
      tmo <= '0; ccnt <= '0; scnt <= '0;
      shreg <= '0; remaining <= '0; first <= 1'b0;
      blk_start <= 1'b0; byte_valid <= 1'b0; byte_data <= '0;
      sof <= 1'b0; eof <= 1'b0;
    end else begin
      blk_start  <= 1'b0;
      byte_valid <= 1'b0;
      sof <= 1'b0;
      eof <= 1'b0;
      case (st)
        S_PRE: if (pre_hit) begin
          st  <= S_SFD;
          tmo <= '0;
        end
        S_SFD: begin
          if (sfd_hit) begin
            st   <= S_PHR;
            ccnt <= '0;
            scnt <= '0;
          end else if (chip_valid) begin
            if (32'(tmo) == SFD_TIMEOUT - 1) st <= S_PRE;
            tmo <= tmo + 1'b1;
          end
        end
        default: begin  // S_PHR, S_DATA
          if (chip_valid) begin
            if (32'(ccnt) == CHIPS_PER_SYM - 1) begin
              ccnt      <= '0;
              blk_start <= 1'b1;
            end else begin
              ccnt <= ccnt + 1'b1;
            end
          end
          if (sym_valid) begin
            shreg <= nxt;
            if (32'(scnt) == SYMS_PER_BYTE - 1) begin
              scnt <= '0;
              if (st == S_PHR) begin
                remaining <= nxt[6:0];
                first     <= 1'b1;
                st        <= (nxt[6:0] == '0) ? S_PRE : S_DATA;
              end else begin
                byte_valid <= 1'b1;
                byte_data  <= nxt;
                sof        <= first;
                first      <= 1'b0;
                remaining  <= remaining - 1'b1;
                if (remaining == 7'd1) begin
                  eof <= 1'b1;
                  st  <= S_PRE;
                end
              end
            end else begin
              scnt <= scnt + 1'b1;
            end
          end
        end
      endcase
    end
  end
endmodule
