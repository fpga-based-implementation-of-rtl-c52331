// Testbench of rx_frontend. The transmitters (tx_opt12, tx_opt3) generate
// the signal; their I/Q samples are recorded, rotated by a carrier phase
// offset and replayed on the interleaved ADC bus, each sample twice (the
// receiver runs at 8 samples per I-branch symbol, the transmitters at 4).
// Checks per mode: after the 4-byte zero preamble, during which the loops
// acquire, every chip decision equals the transmitted chip; theta settles
// to the phase offset (modulo the constellation symmetry); one chip
// leaves per transmitted chip; the early-late gate makes both kinds of
// adjustment; the energy-detection magnitude is large
// during the signal and near zero after it.
module tb_rx_frontend;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, oqpsk = 0;
  logic signed [11:0] adc_iq = '0;
  logic adc_iqsel = 0;
  logic chip_valid, chip_i, chip_q, ted_adv, ted_ret;
  logic signed [15:0] theta, ed_phase;
  logic [16:0] ed_mag;
  int checks = 0, failures = 0;

  rx_frontend dut (.*);

  // Signal sources.
  logic ce12 = 0, ce3 = 0, v12 = 0, v3 = 0, r12, r3, s12, s3, sel12, sel3, b12, b3;
  logic [31:0] d12 = '0, d3 = '0;
  logic signed [11:0] i12, q12, i3, q3, dac12, dac3;
  tx_opt12 u_tx12 (.clk, .rst_n, .ce(ce12), .in_valid(v12), .in_ready(r12), .in_data(d12),
                   .i_out(i12), .q_out(q12), .sample_ce(s12), .dac_iq(dac12), .dac_iqsel(sel12), .busy(b12));
  tx_opt3 u_tx3 (.clk, .rst_n, .ce(ce3), .in_valid(v3), .in_ready(r3), .in_data(d3),
                 .i_out(i3), .q_out(q3), .sample_ce(s3), .dac_iq(dac3), .dac_iqsel(sel3), .busy(b3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int si [$], sq [$];
  always @(posedge clk) begin
    if (s12) begin si.push_back(int'(i12)); sq.push_back(int'(q12)); end
    if (s3)  begin si.push_back(int'(i3));  sq.push_back(int'(q3));  end
  end

  bit gi [$], gq [$];
  int n_adv = 0, n_ret = 0;
  always @(posedge clk) if (rst_n && en) begin
    if (chip_valid) begin gi.push_back(chip_i); gq.push_back(chip_q); end
    if (ted_adv) n_adv++;
    if (ted_ret) n_ret++;
  end

  task automatic run(input bit mode, input real deg);
    logic [31:0] w [8];
    bit ei [$], eq [$];
    real c, s, d, sym;
    int best, lag, mism, maxmag, nchips;
    bit e;
    // word 0 is the 4-byte zero preamble, during which the loops acquire
    w[0] = '0;
    for (int k = 1; k < 8; k++) w[k] = $urandom;
    // expected chips
    e = 0;
    for (int k = 0; k < 256; k++)
      if (!mode) begin
        e = e ^ w[k / 32][k % 32];
        for (int j = 0; j < 15; j++) begin ei.push_back(!bpsk_chip(e, j)); eq.push_back(0); end
      end else if (k < 64) begin
        for (int j = 0; j < 16; j++) begin
          ei.push_back(oqpsk_chip(int'(w[k / 8][4 * (k % 8) +: 4]), 2 * j));
          eq.push_back(oqpsk_chip(int'(w[k / 8][4 * (k % 8) +: 4]), 2 * j + 1));
        end
      end
    nchips = ei.size();
    // transmit and record
    si.delete(); sq.delete();
    @(negedge clk);
    if (mode) ce3 = 1; else ce12 = 1;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      if (mode) begin v3 = 1; d3 = w[k]; end else begin v12 = 1; d12 = w[k]; end
      @(posedge clk iff (mode ? r3 : r12));
    end
    @(negedge clk); v3 = 0; v12 = 0;
    wait (!(mode ? b3 : b12));
    repeat (20) @(negedge clk);
    ce3 = 0; ce12 = 0;
    // replay
    oqpsk = mode; en = 1;
    gi.delete(); gq.delete(); n_adv = 0; n_ret = 0; maxmag = 0;
    c = $cos(deg * 3.14159265 / 180.0);
    s = $sin(deg * 3.14159265 / 180.0);
    for (int k = 0; k < si.size(); k++)
      for (int r = 0; r < 2; r++) begin
        @(posedge clk);
        adc_iq <= 12'($rtoi(si[k] * c - sq[k] * s)); adc_iqsel <= 1;
        @(posedge clk);
        adc_iq <= 12'($rtoi(sq[k] * c + si[k] * s)); adc_iqsel <= 0;
        if (k == si.size() / 2 && int'(ed_mag) > maxmag) maxmag = int'(ed_mag);
      end
    // residual phase of the loop
    sym = mode ? 90.0 : 180.0;
    d = real'(theta) * 360.0 / 65536.0 - deg;
    while (d > sym / 2.0) d -= sym;
    while (d < -sym / 2.0) d += sym;
    check(d < 4.0 && d > -4.0, $sformatf("mode %0d: theta off by %0.2f deg", mode, d));
    for (int k = 0; k < 200; k++) begin
      @(posedge clk); adc_iq <= '0; adc_iqsel <= 1;
      @(posedge clk); adc_iq <= '0; adc_iqsel <= 0;
    end
    check(maxmag > 400, $sformatf("mode %0d: magnitude %0d during the signal", mode, maxmag));
    check(ed_mag < 50, $sformatf("mode %0d: magnitude %0d after the signal", mode, ed_mag));
    // chips: align and compare after the preamble (480 chips BPSK,
    // 128 pairs O-QPSK); a slip inside the periodic preamble is harmless
    best = 1 << 30; lag = 0;
    for (int l = 0; l < 100; l++) begin
      mism = 0;
      for (int k = (mode ? 128 : 480); k + l < gi.size() && k < nchips; k++) begin
        if (gi[k + l] != ei[k]) mism++;
        if (mode && gq[k + l] != eq[k]) mism++;
      end
      if (mism < best) begin best = mism; lag = l; end
    end
    check(best == 0, $sformatf("mode %0d: %0d chip errors (lag %0d)", mode, best, lag));
    check(gi.size() - lag >= nchips && gi.size() - lag <= nchips + 40,
          $sformatf("mode %0d: %0d chips for %0d sent (lag %0d)", mode, gi.size(), nchips, lag));
    check(n_adv > 0 && n_ret > 0, $sformatf("mode %0d: adv %0d ret %0d", mode, n_adv, n_ret));
    en = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(1'b0, 30.0);
    run(1'b1, -25.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
