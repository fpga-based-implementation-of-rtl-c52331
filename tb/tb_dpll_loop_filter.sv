// Testbench of dpll_loop_filter: random errors against a model of the PI
// filter and phase accumulator (integ += KI*e; acc += KP*e + integ, with
// 32-bit wrap; theta = acc[31:16]), enable gaps, and the synchronous clear.
module tb_dpll_loop_filter;
  logic clk = 0, rst_n = 0, clear = 0, ce = 0;
  logic signed [15:0] e = '0, theta;
  int checks = 0, failures = 0;

  dpll_loop_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int integ = 0, acc = 0, v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      e = 16'($urandom);
      ce = ($urandom_range(0, 3) != 0);
      clear = (t == 1500);
      @(negedge clk);
      if (clear) begin integ = 0; acc = 0; end
      else if (ce) begin
        v = int'(e) * 512 + integ;
        integ = integ + int'(e);
        acc = acc + v;
      end
      ce = 0; clear = 0;
      checks++;
      if (theta != 16'(acc >>> 16)) begin
        failures++; $display("FAIL: t=%0d theta %0d exp %0d", t, theta, 16'(acc >>> 16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
