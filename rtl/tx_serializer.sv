// Word serializer between the host FIFO and a transmitter.
//
// Frame words of 32 bits arrive from the host FIFO with a valid/ready
// handshake. On every shift_ce the serializer moves on to the next OUT_W-bit
// unit of the current word, least significant unit first; when the word is
// used up it takes the next word from the FIFO (in_ready is high for that
// one cycle). With OUT_W = 1 this is the 32-to-1 SERDES of the option 1/2
// transmitter, with OUT_W = 4 the bit-to-symbol converter of option 3.
// out_valid is low when no word was available at a shift_ce, which the
// transmitter treats as the end of the frame. clear drops the current word.
//
// Timing: out_data/out_valid change on the clock edge of shift_ce and hold
// until the next shift_ce. LSB-first order is this design's choice (it sends
// each octet LSB first, low nibble first, as the standard does when byte 0
// sits in bits 7:0).
module tx_serializer #(
  parameter int unsigned OUT_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [31:0]      in_data,
  input  logic             shift_ce,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_data
);
  localparam int unsigned UNITS = 32 / OUT_W;
  localparam int RW = $clog2(UNITS + 1);

  logic [31:0]   shreg;
  logic [RW-1:0] remaining;

  assign in_ready  = shift_ce && (remaining <= RW'(1)) && !clear;
  assign out_valid = (remaining != '0);
  assign out_data  = shreg[OUT_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      shreg     <= '0;
      remaining <= '0;
    end else if (shift_ce) begin
      if (remaining > RW'(1)) begin
        shreg     <= shreg >> OUT_W;
        remaining <= remaining - 1'b1;
      end else if (in_valid) begin
        shreg     <= in_data;
        remaining <= RW'(UNITS);
      end else begin
        remaining <= '0;
      end
    end
  end
endmodule
