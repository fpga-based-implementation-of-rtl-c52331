// O-QPSK chip mapper of the option 3 transmitter.
//
// Chips arrive one per chip period with chip_odd marking odd indices. Even
// chips go to the I branch and odd chips to the Q branch, each as a +-1
// amplitude (chip 1 -> +1, chip 0 -> -1) with a strobe. Since odd chips come
// one chip period after even ones, the Q strobes lag the I strobes by half an
// O-QPSK symbol, which is the offset of O-QPSK. Combinational.
module oqpsk_map (
  input  logic              chip_stb,
  input  logic              chip,
  input  logic              chip_odd,
  output logic              i_stb,
  output logic              q_stb,
  output logic signed [3:0] i_sym,
  output logic signed [3:0] q_sym
);
  logic signed [3:0] amp;
  assign amp   = chip ? 4'sd1 : -4'sd1;
  assign i_stb = chip_stb && !chip_odd;
  assign q_stb = chip_stb && chip_odd;
  assign i_sym = amp;
  assign q_sym = amp;
endmodule
