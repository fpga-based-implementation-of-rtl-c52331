// Zero-insertion upsampler.
//
// On every sample enable the output register takes d if a new amplitude is
// strobed on that cycle (stb) and zero otherwise. Driving stb once every
// N sample enables gives an upsampling factor of N (4 in both transmitters);
// the pulse-shaping filter that follows turns the impulses into pulses.
module upsampler #(
  parameter int unsigned W = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_ce,
  input  logic                stb,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)         q <= '0;
    else if (sample_ce) q <= stb ? d : '0;
  end
endmodule
