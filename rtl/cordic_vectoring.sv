// Pipelined CORDIC in vectoring mode.
//
// Drives the vector (x_in, y_in) onto the positive x axis and returns its
// magnitude A_n * |v| (A_n ~ 1.647) and its angle atan2(y, x) (full circle
// = 2^16). A first stage turns vectors with x < 0 by 180 degrees and starts
// the angle at 180 degrees; then STAGES iterations follow, stage i applying
//   d = +1 if y < 0 else -1
//   x' = x - d * (y >>> i),  y' = y + d * (x >>> i),  z' = z - d * atan(2^-i).
// Registers advance on ce; latency STAGES+1 enables. In the receiver it
// measures the amplitude (energy detection) and residual phase of the
// carrier-corrected signal. Widths are this design's choice.
module cordic_vectoring
  import ieee802154_pkg::*;
#(
  parameter int unsigned STAGES = 16,
  parameter int unsigned W      = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic        [W:0]   mag,
  output logic signed [15:0]  phase
);
  logic signed [W+2:0] xs [STAGES+1];
  logic signed [W+2:0] ys [STAGES+1];
  logic signed [15:0]  zs [STAGES+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= STAGES; i++) begin
        xs[i] <= '0;
        ys[i] <= '0;
        zs[i] <= '0;
      end
    end else if (ce) begin
      if (x_in[W-1]) begin
        xs[0] <= -(W+3)'(x_in);
        ys[0] <= -(W+3)'(y_in);
        zs[0] <= 16'sh8000;
      end else begin
        xs[0] <= (W+3)'(x_in);
        ys[0] <= (W+3)'(y_in);
        zs[0] <= '0;
      end
      for (int i = 0; i < STAGES; i++) begin
        if (ys[i][W+2]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - cordic_atan(i);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + cordic_atan(i);
        end
      end
    end
  end

  assign mag   = xs[STAGES][W:0];
  assign phase = zs[STAGES];
endmodule
