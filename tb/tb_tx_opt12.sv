// Testbench of tx_opt12: one 32-bit word is sent; the I samples must equal
// the reference modulation built here (LSB-first bits, differential
// encoding, 15-chip spreading, chip 0 -> +1, 4 samples per chip, raised
// cosine taps 331, 973, 1651, 1946, 1651, 973, 331), Q must stay zero, the
// sample strobe must come every 2 clocks, 480 chips must be sent in
// 3840 clocks, and the DAC bus must alternate I and Q.
module tb_tx_opt12;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0, in_ready, sample_ce, dac_iqsel, busy;
  logic [31:0] in_data = '0;
  logic signed [11:0] i_out, q_out, dac_iq;
  int checks = 0, failures = 0;

  tx_opt12 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int got[$];
  int busy_cycles = 0, last_s = -1, cyc = 0, q_nonzero = 0, sel_errors = 0;
  logic prev_sel = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (busy) busy_cycles++;
    if (sample_ce) begin
      if (last_s >= 0 && cyc - last_s != 2) check(0, "sample period");
      last_s = cyc;
      got.push_back(int'(i_out));
      if (q_out != 0) q_nonzero++;
    end
    if (ce && cyc > 4 && dac_iqsel == prev_sel) sel_errors++;
    prev_sel = dac_iqsel;
  end

  initial begin
    int expv[$];
    int u[$];
    int h [7] = '{331, 973, 1651, 1946, 1651, 973, 331};
    logic [31:0] w;
    bit e;
    int best, bestoff, mism, s;
    w = 32'hA7C3_5E91;
    e = 0;
    for (int b = 0; b < 32; b++) begin
      e = e ^ w[b];
      for (int k = 0; k < 15; k++) begin
        u.push_back(bpsk_chip(e, k) ? -1 : 1);
        u.push_back(0); u.push_back(0); u.push_back(0);
      end
    end
    for (int n = 0; n < u.size() + 6; n++) begin
      s = 0;
      for (int k = 0; k < 7; k++) if (n - k >= 0 && n - k < u.size()) s += h[k] * u[n-k];
      expv.push_back(s);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    ce <= 1; in_valid <= 1; in_data <= w;
    @(posedge clk iff in_ready);
    in_valid <= 0;
    repeat (4200) @(posedge clk);
    check(busy_cycles == 3840, $sformatf("busy for %0d clocks", busy_cycles));
    check(q_nonzero == 0, "Q is zero");
    check(sel_errors == 0, "DAC bus alternates I and Q");
    best = 1 << 30; bestoff = 0;
    for (int off = 0; off < 20; off++) begin
      mism = 0;
      for (int n = 0; n < expv.size(); n++)
        if (off + n >= got.size() || got[off + n] != expv[n]) mism++;
      if (mism < best) begin best = mism; bestoff = off; end
    end
    check(best == 0, $sformatf("%0d of %0d samples differ (offset %0d)", best, expv.size(), bestoff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
