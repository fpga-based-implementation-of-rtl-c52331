// Testbench of dpll_error_gen. BPSK mode: e = sat16((yi * yq) >>> 10),
// registered on the enable. O-QPSK mode: at an I strobe e = sign(pd_i) *
// pd_q * 8, at a Q strobe e = -sign(pd_q) * pd_i * 8, saturated; the value
// is cleared on the next enable without a strobe.
module tb_dpll_error_gen;
  logic clk = 0, rst_n = 0, ce = 0, oqpsk = 0, pd_stb_i = 0, pd_stb_q = 0;
  logic signed [17:0] yi = '0, yq = '0, pd_i = '0, pd_q = '0;
  logic signed [15:0] e;
  int checks = 0, failures = 0;

  dpll_error_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int x;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      x = (t < 150) ? 2000 : 100000;
      yi = 18'($signed($urandom_range(0, 2 * x)) - x);
      yq = 18'($signed($urandom_range(0, 2 * x)) - x);
      ce = 1;
      @(negedge clk);
      ce = 0;
      check(int'(e) == sat((longint'(yi) * longint'(yq)) >>> 10),
            $sformatf("bpsk %0d*%0d -> %0d", yi, yq, e));
    end
    oqpsk = 1;
    for (int t = 0; t < 300; t++) begin
      bit qi;
      @(negedge clk);
      qi = t[0];
      x = (t < 150) ? 3000 : 100000;
      pd_i = 18'($signed($urandom_range(0, 2 * x)) - x);
      pd_q = 18'($signed($urandom_range(0, 2 * x)) - x);
      pd_stb_i = !qi; pd_stb_q = qi;
      @(negedge clk);
      pd_stb_i = 0; pd_stb_q = 0;
      if (!qi) check(int'(e) == sat((pd_i < 0 ? -longint'(pd_q) : longint'(pd_q)) * 8),
                     $sformatf("I strobe %0d %0d -> %0d", pd_i, pd_q, e));
      else     check(int'(e) == sat((pd_q < 0 ? longint'(pd_i) : -longint'(pd_i)) * 8),
                     $sformatf("Q strobe %0d %0d -> %0d", pd_i, pd_q, e));
      ce = 1;
      @(negedge clk);
      ce = 0;
      check(e == 0, "cleared after the enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
