// Hardware switch between the option 1/2 and option 3 IPs.
//
// A registered 2:1 selector: y takes b (option 3) when sel is 1 and a
// (option 1/2) when sel is 0, on every clock while ce is high; while ce is
// low (during an option change) y is held at zero so no half-flushed data
// leaves. Used once on the transmit side (DAC bus) and once on the receive
// side (decoded byte stream). One cycle of latency.
module hw_switch #(
  parameter int unsigned W = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_ff @(posedge clk) begin
    if (!rst_n || !ce) y <= '0;
    else               y <= sel ? b : a;
  end
endmodule
