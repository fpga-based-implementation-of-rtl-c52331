// Testbench of max_comparator: random candidates; the registered output
// must be the larger value with its index, a winning ties, and hold while
// ce is low.
module tb_max_comparator;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [11:0] a_val = '0, b_val = '0, y_val;
  logic [3:0] a_idx = '0, b_idx = '0, y_idx;
  int checks = 0, failures = 0;
  max_comparator #(.VW(12), .IW(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [11:0] ev; logic [3:0] ei;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      a_val = 12'($urandom); b_val = (n % 10 == 0) ? a_val : 12'($urandom);
      a_idx = 4'($urandom); b_idx = 4'($urandom);
      ev = (b_val > a_val) ? b_val : a_val;
      ei = (b_val > a_val) ? b_idx : a_idx;
      ce = 1;
      @(negedge clk);
      ce = 0;
      checks++;
      if (y_val != ev || y_idx != ei) begin failures++; $display("FAIL: case %0d", n); end
      a_val = 12'hFFF; a_idx = 4'hF;
      @(negedge clk);
      checks++;
      if (y_val != ev) begin failures++; $display("FAIL: hold %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
