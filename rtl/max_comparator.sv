// Comparator node of the symbol-bank comparator tree.
//
// Takes two (correlation value, symbol index) candidates and registers the
// one with the larger value on ce; on a tie the a input (the lower index in
// the tree) wins. Fifteen of these in four registered stages pick the best
// of sixteen correlators.
module max_comparator #(
  parameter int unsigned VW = 12,
  parameter int unsigned IW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic [VW-1:0] a_val,
  input  logic [IW-1:0] a_idx,
  input  logic [VW-1:0] b_val,
  input  logic [IW-1:0] b_idx,
  output logic [VW-1:0] y_val,
  output logic [IW-1:0] y_idx
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_val <= '0;
      y_idx <= '0;
    end else if (ce) begin
      if (b_val > a_val) begin
        y_val <= b_val;
        y_idx <= b_idx;
      end else begin
        y_val <= a_val;
        y_idx <= a_idx;
      end
    end
  end
endmodule
