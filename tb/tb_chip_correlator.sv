// Testbench of chip_correlator at its default (32 chip pairs, reference =
// one O-QPSK preamble byte). A random chip stream with embedded preamble
// bytes (also turned by 90 degrees) is fed; |C|^2 and the sign of Re are
// compared with a correlation computed here with +-1 arithmetic, valid must
// follow each enable by one cycle, and a full preamble byte must give the
// peak 64^2 = 4096 in any quarter-turn phase.
module tb_chip_correlator;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, ce = 0, ci = 0, cq = 0, valid, neg;
  logic [15:0] mag2;
  logic [0:31] win_i, win_q;
  int checks = 0, failures = 0;

  chip_correlator dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int wi [32], wq [32], ri [32], rq [32];
  int peaks = 0;

  task automatic push(input bit a, input bit b);
    int re, im;
    @(negedge clk);
    ci = a; cq = b; ce = 1;
    for (int k = 0; k < 31; k++) begin wi[k] = wi[k+1]; wq[k] = wq[k+1]; end
    wi[31] = a ? 1 : -1; wq[31] = b ? 1 : -1;
    @(negedge clk);
    ce = 0;
    check(valid, "valid one cycle after the enable");
    re = 0; im = 0;
    for (int k = 0; k < 32; k++) begin
      re += ri[k] * wi[k] + rq[k] * wq[k];
      im += ri[k] * wq[k] - rq[k] * wi[k];
    end
    check(int'(mag2) == re * re + im * im, $sformatf("mag2 %0d exp %0d", mag2, re * re + im * im));
    check(neg == (re < 0), "sign of Re");
    if (mag2 == 4096) peaks++;
    @(negedge clk);
    check(!valid, "valid is one cycle");
  endtask

  initial begin
    for (int k = 0; k < 32; k++) begin
      ri[k] = oqpsk_chip(0, 2 * (k % 16)) ? 1 : -1;
      rq[k] = oqpsk_chip(0, 2 * (k % 16) + 1) ? 1 : -1;
      wi[k] = -1; wq[k] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 8; rep++) begin
      for (int k = 0; k < 50; k++) push($urandom_range(0, 1), $urandom_range(0, 1));
      for (int k = 0; k < 32; k++) begin
        bit a, b;
        a = oqpsk_chip(0, 2 * (k % 16)); b = oqpsk_chip(0, 2 * (k % 16) + 1);
        case (rep % 4)  // multiply by j^rep: (a + jb) -> (-b + ja) ...
          0: push(a, b);
          1: push(!b, a);
          2: push(!a, !b);
          3: push(b, !a);
        endcase
      end
    end
    check(peaks >= 8, $sformatf("%0d correlation peaks", peaks));
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(win_i == '0 && win_q == '0, "clear empties the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
