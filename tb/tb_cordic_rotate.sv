// Testbench of cordic_rotate: random vectors and angles (full circle =
// 2^16) against floating-point rotation scaled by the CORDIC gain 1.64676;
// the result must appear exactly 17 enables after the input (16 stages plus
// the folding stage) and hold while the enable is low.
module tb_cordic_rotate;
  logic clk = 0, rst_n = 0, ce = 0;
  logic signed [15:0] x_in = '0, y_in = '0, z_in = '0;
  logic signed [17:0] x_out, y_out;
  int checks = 0, failures = 0;
  localparam real GAIN = 1.6467602581;
  localparam real PI = 3.14159265358979;

  cordic_rotate dut (.*);
  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ex [$], ey [$];
    real a, rx, ry;
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ce = (t % 3 != 2);  // enable pattern with gaps
      if (ce) begin
        x_in = 16'($signed($urandom_range(0, 40000)) - 20000);
        y_in = 16'($signed($urandom_range(0, 40000)) - 20000);
        z_in = 16'($urandom);
        a = real'(z_in) * 2.0 * PI / 65536.0;
        ex.push_back(GAIN * (real'(x_in) * $cos(a) - real'(y_in) * $sin(a)));
        ey.push_back(GAIN * (real'(x_in) * $sin(a) + real'(y_in) * $cos(a)));
        n++;
        @(posedge clk);
        #1;
        if (n >= 17) begin
          rx = ex.pop_front(); ry = ey.pop_front();
          checks++;
          if (fabs(real'(x_out) - rx) > 12.0 || fabs(real'(y_out) - ry) > 12.0) begin
            failures++;
            $display("FAIL: got (%0d,%0d) exp (%0.1f,%0.1f)", x_out, y_out, rx, ry);
          end
        end
      end else begin
        @(posedge clk);
      end
    end
    // output holds without enable
    ce = 0;
    begin
      logic signed [17:0] hx;
      hx = x_out;
      repeat (5) @(posedge clk);
      checks++;
      if (x_out != hx) begin failures++; $display("FAIL: output moved without enable"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
