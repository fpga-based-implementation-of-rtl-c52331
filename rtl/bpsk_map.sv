// BPSK chip mapper of the option 1/2 transmitter.
//
// Chip 0 becomes amplitude +1 and chip 1 becomes -1, as a 4-bit signed value
// (the 4-bit mapper width of the option 3 chain is reused). Combinational.
// The sign convention is this design's choice; the receiver is insensitive
// to it because it correlates squared values and decodes differentially.
module bpsk_map (
  input  logic              chip,
  output logic signed [3:0] sym
);
  assign sym = chip ? -4'sd1 : 4'sd1;
endmodule
