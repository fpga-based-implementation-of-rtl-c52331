// Reference values for the testbenches.
//
// The 16 chip sequences of the O-QPSK PHY written out as literals (c0 is the
// leftmost digit), the 15-chip sequence of the BPSK PHY, and small helpers
// that build reference chip streams for whole frames. The testbenches
// compare the design against these rather than against the design's own
// tables.
package tb_ref_pkg;

  localparam logic [31:0] OQPSK_ROWS [16] = '{
    32'b11011001110000110101001000101110,  // 0
    32'b11101101100111000011010100100010,  // 1
    32'b00101110110110011100001101010010,  // 2
    32'b00100010111011011001110000110101,  // 3
    32'b01010010001011101101100111000011,  // 4
    32'b00110101001000101110110110011100,  // 5
    32'b11000011010100100010111011011001,  // 6
    32'b10011100001101010010001011101101,  // 7
    32'b10001100100101100000011101111011,  // 8
    32'b10111000110010010110000001110111,  // 9
    32'b01111011100011001001011000000111,  // 10
    32'b01110111101110001100100101100000,  // 11
    32'b00000111011110111000110010010110,  // 12
    32'b01100000011101111011100011001001,  // 13
    32'b10010110000001110111101110001100,  // 14
    32'b11001001011000000111011110111000  // 15
  };

  localparam logic [14:0] BPSK_ROW = 15'b111101011001000;

  // Chip k (0 = first sent) of O-QPSK symbol s.
  function automatic bit oqpsk_chip(input int s, input int k);
    return OQPSK_ROWS[s][31 - k];
  endfunction

  // Chip k of the BPSK sequence for encoded bit e.
  function automatic bit bpsk_chip(input bit e, input int k);
    return BPSK_ROW[14 - k] ^ e;
  endfunction

endpackage
