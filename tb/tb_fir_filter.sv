// Testbench of fir_filter at its default (8-tap half-sine matched filter,
// shift 14): random inputs against a convolution computed here from the
// tap values 399, 1137, 1702, 2008, 2008, 1702, 1137, 399, the output
// registered on the enable edge; plus saturation in a second instance with
// no shift.
module tb_fir_filter;
  logic clk = 0, rst_n = 0, ce = 0;
  logic signed [11:0] d = '0, q, qs;
  int checks = 0, failures = 0;
  int h [8] = '{399, 1137, 1702, 2008, 2008, 1702, 1137, 399};
  int hist [8];

  fir_filter dut (.clk, .rst_n, .ce, .d, .q);
  fir_filter #(.NTAPS(2), .IN_W(12), .OUT_W(12), .COEF_W(12), .SHIFT(0),
               .COEFS({12'sd2, 12'sd1})) sat_dut (.clk, .rst_n, .ce, .d, .q(qs));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint acc;
    int e;
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d = 12'($urandom);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(d);
      ce = 1;
      @(negedge clk);
      ce = 0;
      acc = 0;
      for (int k = 0; k < 8; k++) acc += longint'(hist[k]) * h[k];
      e = int'(acc >>> 14);
      if (e > 2047) e = 2047;
      if (e < -2048) e = -2048;
      checks++;
      if (int'(q) != e) begin failures++; $display("FAIL: n=%0d got %0d exp %0d", n, q, e); end
      // second instance: y = x(n) + 2 x(n-1), saturated to 12 bits
      e = hist[0] + 2 * hist[1];
      if (e > 2047) e = 2047;
      if (e < -2048) e = -2048;
      checks++;
      if (int'(qs) != e) begin failures++; $display("FAIL: sat n=%0d got %0d exp %0d", n, qs, e); end
      @(negedge clk);  // idle cycle: output holds
      checks++;
      if (int'(qs) != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
