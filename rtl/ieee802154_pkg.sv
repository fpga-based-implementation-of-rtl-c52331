// Shared constants and helpers of the IEEE 802.15.4 multi-PHY baseband.
//
// Holds the spreading sequences of the two PHY families, the frame
// delimiters and a few small types. Chip vectors are declared [0:N-1] so
// that index k is chip c_k, the k-th chip sent on air.
//
// The option 1/2 sequence and the five printed option 3 rows follow the
// symbol-to-chip tables of the standard. The remaining option 3 rows are
// generated by the rule those rows obey: symbols 1..7 are symbol 0 rotated
// right by 4 chips per step, and symbols 8..15 are symbols 0..7 with every
// odd-indexed chip inverted.
package ieee802154_pkg;

  // Sample width of the LMS6002D converters.
  localparam int SAMPLE_W = 12;

  // Option 1/2: 15-chip sequence of bit 0; bit 1 uses the inverse.
  localparam logic [0:14] OPT12_SEQ0 = 15'b111101011001000;

  // Option 3: 32-chip sequence of symbol 0.
  localparam logic [0:31] OPT3_SEQ0 = 32'b11011001110000110101001000101110;

  // Frame delimiters (PPDU header).
  localparam logic [7:0] PREAMBLE_BYTE = 8'h00;
  localparam logic [7:0] SFD_BYTE      = 8'hA7;

  typedef enum logic {
    PHY_OPT12 = 1'b0,
    PHY_OPT3  = 1'b1
  } phy_opt_e;

  // Chip sequence c_0..c_31 of option 3 data symbol s.
  function automatic logic [0:31] opt3_seq(input logic [3:0] s);
    logic [0:31] r;
    int unsigned sh;
    sh = 4 * int'(s[2:0]);
    for (int k = 0; k < 32; k++) begin
      r[k] = OPT3_SEQ0[(k + 32 - sh) % 32];
      if (s[3] && (k % 2 == 1)) r[k] = ~r[k];
    end
    return r;
  endfunction

  // Even chips (I branch) of an option 3 sequence: c_0, c_2, ..., c_30.
  function automatic logic [0:15] opt3_even(input logic [0:31] c);
    logic [0:15] r;
    for (int k = 0; k < 16; k++) r[k] = c[2*k];
    return r;
  endfunction

  // Odd chips (Q branch) of an option 3 sequence: c_1, c_3, ..., c_31.
  function automatic logic [0:15] opt3_odd(input logic [0:31] c);
    logic [0:15] r;
    for (int k = 0; k < 16; k++) r[k] = c[2*k+1];
    return r;
  endfunction

  // Option 1/2 chips of one byte after differential encoding. The encoder
  // state before the byte is prev; bits go LSB first. Index 0 is the first
  // chip sent.
  function automatic logic [0:119] opt12_byte_chips(input logic [7:0] b, input logic prev);
    logic [0:119] r;
    logic e;
    e = prev;
    for (int n = 0; n < 8; n++) begin
      e = e ^ b[n];
      for (int k = 0; k < 15; k++) r[15*n + k] = OPT12_SEQ0[k] ^ e;
    end
    return r;
  endfunction

  // Differential-encoder state after a byte, starting from prev.
  function automatic logic opt12_byte_state(input logic [7:0] b, input logic prev);
    return prev ^ (^b);
  endfunction

  // CORDIC elementary angles atan(2^-i), in units of 2*pi/65536
  // (round(atan(2^-i) * 65536 / (2*pi))).
  function automatic logic signed [15:0] cordic_atan(input int i);
    case (i)
      0: return 16'sd8192;
      1: return 16'sd4836;
      2: return 16'sd2555;
      3: return 16'sd1297;
      4: return 16'sd651;
      5: return 16'sd326;
      6: return 16'sd163;
      7: return 16'sd81;
      8: return 16'sd41;
      9: return 16'sd20;
      10: return 16'sd10;
      11: return 16'sd5;
      12: return 16'sd3;
      13: return 16'sd1;
      14: return 16'sd1;
      default: return 16'sd0;
    endcase
  endfunction

endpackage
