// Differential encoder of the option 1/2 transmitter.
//
// Each raw bit d is sent as e = d xor (previous encoded bit). The output is
// combinational from d and the stored previous bit; the stored bit takes e
// on the clock edge of ce, which the transmitter raises when it moves on to
// the next bit. clear sets the stored bit to 0 (the standard's initial
// value); the transmitter clears between frames.
module diff_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic ce,
  input  logic d,
  output logic e
);
  logic prev;

  assign e = d ^ prev;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) prev <= 1'b0;
    else if (ce)         prev <= e;
  end
endmodule
