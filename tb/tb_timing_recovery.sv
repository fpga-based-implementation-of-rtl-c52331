// Testbench of timing_recovery with synthetic matched-filter output: each
// chip is a triangular pulse 8 samples wide (peak in the middle). BPSK
// mode: chips on I only. O-QPSK mode: Q pulses offset by 4 samples. The
// signal is sampled with a rate offset (1 extra sample per 400), so the
// early-late gate must adjust; after lock every decided chip must match
// the sent chip, one chip must leave per sent chip (the sender's rate, not
// one per 8 local samples), and both
// kinds of period adjustment must be seen.
module tb_timing_recovery;
  logic clk = 0, rst_n = 0, clear = 0, ce = 0, oqpsk = 0;
  logic signed [17:0] yi = '0, yq = '0, pd_i, pd_q;
  logic chip_valid, chip_i, chip_q, adv, ret, pd_stb_i, pd_stb_q;
  int checks = 0, failures = 0;

  timing_recovery dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit gi[$], gq[$];
  int n_adv = 0, n_ret = 0;
  always @(posedge clk) if (rst_n) begin
    if (chip_valid) begin gi.push_back(chip_i); gq.push_back(chip_q); end
    if (adv) n_adv++;
    if (ret) n_ret++;
  end

  function automatic real pulse(input real t);  // pulse on [0, 8), peak at 4
    if (t < 0.0 || t >= 8.0) return 0.0;
    return 1.0 - ((t > 4.0 ? t - 4.0 : 4.0 - t) / 4.0);
  endfunction

  task automatic run(input bit mode, input int nchips, input real stretch);
    bit ci [$], cq [$];
    real t, vi, vq;
    int nsamp, m, best, lag, mism;
    for (int k = 0; k < nchips; k++) begin
      ci.push_back($urandom_range(0, 1)); cq.push_back($urandom_range(0, 1));
    end
    gi.delete(); gq.delete(); n_adv = 0; n_ret = 0;
    oqpsk = mode;
    nsamp = $rtoi(real'(nchips * 8) / stretch) - 16;
    for (int n = 0; n < nsamp; n++) begin
      t = real'(n) * stretch;
      m = $rtoi(t / 8.0);
      vi = 0.0; vq = 0.0;
      for (int j = m - 1; j <= m + 1; j++) if (j >= 0 && j < nchips) begin
        vi += (ci[j] ? 3000.0 : -3000.0) * pulse(t - 8.0 * j);
        if (mode) vq += (cq[j] ? 3000.0 : -3000.0) * pulse(t - 8.0 * j - 4.0);
      end
      @(negedge clk);
      yi = 18'($rtoi(vi)); yq = 18'($rtoi(vq));
      ce = 1;
      @(negedge clk);
      ce = 0;
    end
    repeat (20) @(negedge clk);
    // Align the decided chips (after 40 for lock) with the sent chips.
    best = 1 << 30; lag = 0;
    for (int l = -8; l <= 8; l++) begin
      mism = 0;
      for (int k = 40; k < gi.size() - 2; k++) begin
        if (k + l < 0 || k + l >= nchips) begin mism++; continue; end
        if (gi[k] != ci[k + l]) mism++;
        if (mode && gq[k] != cq[k + l]) mism++;
      end
      if (mism < best) begin best = mism; lag = l; end
    end
    check(best == 0, $sformatf("mode %0d: %0d chip errors after lock", mode, best));
    // The loop follows the sender's chip rate, not the local 8 samples.
    check(gi.size() >= nchips - 4 && gi.size() <= nchips,
          $sformatf("mode %0d: %0d chips from %0d samples", mode, gi.size(), nsamp));
    check(n_adv > 0 && n_ret > 0, $sformatf("mode %0d: adv %0d ret %0d", mode, n_adv, n_ret));
    check(n_adv != n_ret, "rate offset shows as unequal adjustments");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(1'b0, 1500, 1.0025);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    run(1'b1, 1500, 0.9975);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
