// Testbench of diff_encoder: random bits against the rule
// e(n) = d(n) xor e(n-1), e(-1) = 0, including clear.
module tb_diff_encoder;
  logic clk = 0, rst_n = 0, clear = 0, ce = 0, d = 0, e;
  int checks = 0, failures = 0;
  bit ref_prev = 0;

  diff_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d = 1'($urandom);
      if (n == 100) begin clear = 1; ref_prev = 0; @(negedge clk); clear = 0; end
      #1 check(e == (d ^ ref_prev), $sformatf("bit %0d", n));
      ce = 1; @(negedge clk); ce = 0;
      ref_prev = d ^ ref_prev;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
