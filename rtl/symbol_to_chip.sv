// Option 3 spreader: one 4-bit data symbol to 32 chips.
//
// A chip counter restarts on symbol_ce and advances on chip_ce; the output
// is chip c_k of the symbol's 32-chip sequence (opt3_seq in the package,
// the standard's symbol-to-chip table). chip_odd marks odd chip indices,
// which the O-QPSK mapper sends on the Q branch. Outputs are combinational
// from the counter and the symbol, valid from the chip_ce edge onward.
module symbol_to_chip
  import ieee802154_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       symbol_ce,
  input  logic       chip_ce,
  input  logic [3:0] symbol,
  output logic       chip,
  output logic       chip_odd
);
  logic [4:0]  idx;
  logic [0:31] seq;

  always_comb begin
    seq      = opt3_seq(symbol);
    chip     = seq[idx];
    chip_odd = idx[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         idx <= '0;
    else if (symbol_ce) idx <= '0;
    else if (chip_ce)   idx <= idx + 1'b1;
  end
endmodule
