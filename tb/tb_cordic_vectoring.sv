// Testbench of cordic_vectoring: random vectors in all four quadrants
// against floating-point magnitude (times the gain 1.64676) and atan2
// (full circle = 2^16); latency must be exactly 17 enables.
module tb_cordic_vectoring;
  logic clk = 0, rst_n = 0, ce = 0;
  logic signed [15:0] x_in = '0, y_in = '0;
  logic [16:0] mag;
  logic signed [15:0] phase;
  int checks = 0, failures = 0;
  localparam real GAIN = 1.6467602581;
  localparam real PI = 3.14159265358979;

  cordic_vectoring dut (.*);
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
    real em [$], ep [$];
    real m, p, d;
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ce = 1;
      do begin
        x_in = 16'($signed($urandom_range(0, 60000)) - 30000);
        y_in = 16'($signed($urandom_range(0, 60000)) - 30000);
      end while ($sqrt(real'(x_in) ** 2 + real'(y_in) ** 2) < 2000.0);
      em.push_back(GAIN * $sqrt(real'(x_in) ** 2 + real'(y_in) ** 2));
      ep.push_back($atan2(real'(y_in), real'(x_in)) * 65536.0 / (2.0 * PI));
      n++;
      @(posedge clk);
      #1;
      if (n >= 17) begin
        m = em.pop_front(); p = ep.pop_front();
        d = real'(phase) - p;
        if (d > 32768.0) d -= 65536.0;
        if (d < -32768.0) d += 65536.0;
        checks++;
        if (fabs(real'(mag) - m) > 12.0 || fabs(d) > 12.0) begin
          failures++;
          $display("FAIL: got mag %0d phase %0d exp %0.1f %0.1f", mag, phase, m, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
