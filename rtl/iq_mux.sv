// I/Q interleaver for the LMS6002D transmit data bus.
//
// The converter takes I and Q on one 12-bit bus, I flagged by iqsel, at twice
// the sample rate. On a sample_ce cycle the block latches a sample pair; on
// the next cycle it drives I with iqsel = 1 and on the cycles after that Q
// with iqsel = 0, until the next pair. With one sample_ce every two clocks
// the bus carries I, Q, I, Q. The exact flag polarity is this design's
// choice.
module iq_mux #(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_ce,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic signed [W-1:0] iq,
  output logic                iqsel
);
  logic signed [W-1:0] q_hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      iq     <= '0;
      iqsel  <= 1'b0;
      q_hold <= '0;
    end else if (sample_ce) begin
      iq     <= i_in;
      iqsel  <= 1'b1;
      q_hold <= q_in;
    end else begin
      iq     <= q_hold;
      iqsel  <= 1'b0;
    end
  end
endmodule
