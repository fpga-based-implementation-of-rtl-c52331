// HW-RECONF controller: selects the active PHY option.
//
// The host writes a 32-bit command word (cfg_valid/cfg_data); bit 0 is the
// requested option (0 = option 1/2, 1 = option 3). A request for the option
// already running is ignored. On a change the FSM enters S_FLUSH, drops
// every enable for FLUSH_CYCLES clocks so the old option's pipelines and
// switches empty, and then enters the new option's state, where it enables
// that transmitter, that receiver and both hardware switches. Reset starts
// in option 1/2. switched pulses when a new option takes effect.
// The command encoding, flush length and reset option are this design's
// choices; the enable names follow the block diagram.
module hw_reconf
  import ieee802154_pkg::*;
#(
  parameter int unsigned FLUSH_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_valid,
  input  logic [31:0] cfg_data,
  output phy_opt_e    opt_sel,
  output logic        tx_opt12_ce,
  output logic        tx_opt3_ce,
  output logic        tx_switch_ce,
  output logic        rx_opt12_ce,
  output logic        rx_opt3_ce,
  output logic        rx_switch_ce,
  output logic        switched
);
  typedef enum logic [1:0] {S_OPT12, S_OPT3, S_FLUSH} state_e;

  state_e   st;
  phy_opt_e target;
  logic [$clog2(FLUSH_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= S_OPT12;
      target   <= PHY_OPT12;
      opt_sel  <= PHY_OPT12;
      cnt      <= '0;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      case (st)
        S_OPT12, S_OPT3: begin
          if (cfg_valid && (phy_opt_e'(cfg_data[0]) != opt_sel)) begin
            target <= phy_opt_e'(cfg_data[0]);
            st     <= S_FLUSH;
            cnt    <= '0;
          end
        end
        default: begin
          if (32'(cnt) == FLUSH_CYCLES - 1) begin
            st       <= (target == PHY_OPT3) ? S_OPT3 : S_OPT12;
            opt_sel  <= target;
            switched <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

  always_comb begin
    tx_opt12_ce  = (st == S_OPT12);
    rx_opt12_ce  = (st == S_OPT12);
    tx_opt3_ce   = (st == S_OPT3);
    rx_opt3_ce   = (st == S_OPT3);
    tx_switch_ce = (st != S_FLUSH);
    rx_switch_ce = (st != S_FLUSH);
  end
endmodule
