// Option 1/2 spreader: one encoded bit to 15 chips.
//
// A chip counter restarts on symbol_ce (first chip of a bit) and advances on
// chip_ce. The output chip is c_k of the bit's sequence: the standard's
// sequence 111101011001000 for bit 0 and its inverse for bit 1, so the chip
// rate is 15 times the bit rate. The chip is combinational from the counter
// and bit_in, valid from the clock edge of chip_ce until the next one.
module bit_to_chip
  import ieee802154_pkg::*;
#(
  parameter int unsigned N_CHIPS = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic symbol_ce,
  input  logic chip_ce,
  input  logic bit_in,
  output logic chip
);
  logic [$clog2(N_CHIPS)-1:0] idx;

  assign chip = OPT12_SEQ0[idx] ^ bit_in;

  always_ff @(posedge clk) begin
    if (!rst_n)         idx <= '0;
    else if (symbol_ce) idx <= '0;
    else if (chip_ce)   idx <= (32'(idx) == N_CHIPS - 1) ? '0 : idx + 1'b1;
  end
endmodule
