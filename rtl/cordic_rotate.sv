// Pipelined CORDIC in rotation mode.
//
// Rotates the vector (x_in, y_in) by the angle z_in (full circle = 2^16)
// and returns A_n * (x cos z - y sin z, y cos z + x sin z), A_n ~ 1.647.
// A first stage folds the angle into [-90, +90) degrees by negating the
// vector when needed; then STAGES iterations follow, stage i applying
//   d = +1 if z >= 0 else -1
//   x' = x - d * (y >>> i),  y' = y + d * (x >>> i),  z' = z - d * atan(2^-i).
// Every stage is a register that advances on ce, so one result leaves per
// ce after STAGES+1 enables of latency. The data path is two bits wider
// than the input to hold the CORDIC gain. The 16-stage default follows the
// DPLL; widths and the range-folding stage are this design's choice.
module cordic_rotate
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
  input  logic signed [15:0]  z_in,
  output logic signed [W+1:0] x_out,
  output logic signed [W+1:0] y_out
);
  logic signed [W+1:0] xs [STAGES+1];
  logic signed [W+1:0] ys [STAGES+1];
  logic signed [15:0]  zs [STAGES+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= STAGES; i++) begin
        xs[i] <= '0;
        ys[i] <= '0;
        zs[i] <= '0;
      end
    end else if (ce) begin
      // Range folding: angles in [90, 270) degrees become a 180-degree
      // turn of the vector plus a rotation inside [-90, 90).
      if (z_in[15] ^ z_in[14]) begin
        xs[0] <= -(W+2)'(x_in);
        ys[0] <= -(W+2)'(y_in);
        zs[0] <= z_in - 16'sh8000;
      end else begin
        xs[0] <= (W+2)'(x_in);
        ys[0] <= (W+2)'(y_in);
        zs[0] <= z_in;
      end
      for (int i = 0; i < STAGES; i++) begin
        if (!zs[i][15]) begin
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

  assign x_out = xs[STAGES];
  assign y_out = ys[STAGES];
endmodule
