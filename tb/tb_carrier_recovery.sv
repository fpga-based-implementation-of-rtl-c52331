// Testbench of carrier_recovery. BPSK mode: random +-1000 symbols rotated
// by a fixed phase; after settling the loop phase theta must equal that
// phase modulo 180 degrees within 2 degrees and the derotated Q branch
// must be small against I. A second run adds a frequency offset (phase
// ramp); the second-order loop must keep the residual phase under 5
// degrees. A clear must return theta to 0. Samples come every 2 clocks.
module tb_carrier_recovery;
  logic clk = 0, rst_n = 0, clear = 0, ce = 0, oqpsk = 0;
  logic pd_stb_i = 0, pd_stb_q = 0;
  logic signed [17:0] pd_i = '0, pd_q = '0, yi, yq;
  logic signed [11:0] xi = '0, xq = '0;
  logic signed [15:0] theta;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  carrier_recovery dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Runs n samples at phase p0 + n * dp (degrees); returns the worst
  // residual phase (degrees, modulo 180) over the last quarter.
  task automatic run(input int n, input real p0, input real dp, output real worst);
    real p, a, res;
    worst = 0.0;
    for (int k = 0; k < n; k++) begin
      p = (p0 + dp * k) * PI / 180.0;
      a = ($urandom_range(0, 1) != 0) ? 1000.0 : -1000.0;
      @(negedge clk);
      xi = 12'($rtoi(a * $cos(p)));
      xq = 12'($rtoi(a * $sin(p)));
      ce = 1;
      @(negedge clk);
      ce = 0;
      if (k > 3 * n / 4) begin
        res = $atan2(real'(yq), real'(yi)) * 180.0 / PI;
        if (res > 90.0) res -= 180.0;
        if (res < -90.0) res += 180.0;
        if (res < 0.0) res = -res;
        if (res > worst) worst = res;
      end
    end
  endtask

  initial begin
    real worst, d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(8000, 40.0, 0.0, worst);
    d = real'(theta) * 360.0 / 65536.0 - 40.0;
    while (d > 90.0) d -= 180.0;
    while (d < -90.0) d += 180.0;
    check(d < 2.0 && d > -2.0, $sformatf("theta off by %0.2f deg", d));
    check(worst < 3.0, $sformatf("fixed phase: residual %0.2f deg", worst));
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(theta == 0, "clear returns theta to 0");
    run(12000, -30.0, 0.005, worst);
    check(worst < 5.0, $sformatf("frequency offset: residual %0.2f deg", worst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
