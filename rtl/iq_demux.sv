// I/Q de-interleaver for the LMS6002D receive data bus.
//
// The converter delivers I (iqsel = 1) and then Q (iqsel = 0) on one 12-bit
// bus at twice the sample rate. The block holds the I word and, on the Q
// word that follows, outputs the pair with a one-cycle sample_ce. A Q word
// with no I word before it is ignored. Latency: the pair appears one clock
// after the Q word. Framing matches iq_mux and is this design's choice.
module iq_demux #(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] iq,
  input  logic                iqsel,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out,
  output logic                sample_ce
);
  logic signed [W-1:0] i_hold;
  logic                have_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_hold    <= '0;
      have_i    <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
      sample_ce <= 1'b0;
    end else begin
      sample_ce <= 1'b0;
      if (iqsel) begin
        i_hold <= iq;
        have_i <= 1'b1;
      end else if (have_i) begin
        i_out     <= i_hold;
        q_out     <= iq;
        sample_ce <= 1'b1;
        have_i    <= 1'b0;
      end
    end
  end
endmodule
