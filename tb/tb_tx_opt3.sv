// Testbench of tx_opt3: two 32-bit words are sent; I and Q samples must
// equal the reference O-QPSK modulation built here (low nibble first,
// 32-chip sequences from the standard's table, even chips on I, odd chips
// on Q one chip later, chip 1 -> +1, impulses every 4 samples, half-sine
// taps 0, 1448, 2047, 1448). Each word must take 8 symbols x 32 chips x
// 2 samples x 2 clocks = 1024 clocks.
module tb_tx_opt3;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0, in_ready, sample_ce, dac_iqsel, busy;
  logic [31:0] in_data = '0;
  logic signed [11:0] i_out, q_out, dac_iq;
  int checks = 0, failures = 0;

  tx_opt3 dut (.*);
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

  int gi[$], gq[$];
  int busy_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (sample_ce) begin gi.push_back(int'(i_out)); gq.push_back(int'(q_out)); end
  end

  initial begin
    int ui[$], uq[$], ei[$], eq[$];
    int h [4] = '{0, 1448, 2047, 1448};
    logic [31:0] w [2];
    int sym, c, best, bestoff, mism, si, sq;
    w[0] = 32'h7A00_0000; w[1] = 32'h9E3C_51B8;
    for (int m = 0; m < 16; m++) begin
      sym = int'(w[m/8][4*(m%8) +: 4]);
      for (int k = 0; k < 32; k += 2) begin
        c = oqpsk_chip(sym, k) ? 1 : -1;
        ui.push_back(c); ui.push_back(0); ui.push_back(0); ui.push_back(0);
        c = oqpsk_chip(sym, k + 1) ? 1 : -1;
        uq.push_back(0); uq.push_back(0); uq.push_back(c); uq.push_back(0);
      end
    end
    for (int n = 0; n < ui.size() + 3; n++) begin
      si = 0; sq = 0;
      for (int k = 0; k < 4; k++) if (n - k >= 0 && n - k < ui.size()) begin
        si += h[k] * ui[n-k]; sq += h[k] * uq[n-k];
      end
      ei.push_back(si); eq.push_back(sq);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    ce <= 1; in_valid <= 1; in_data <= w[0];
    @(posedge clk iff in_ready);
    in_data <= w[1];
    @(posedge clk iff in_ready);
    in_valid <= 0;
    repeat (2300) @(posedge clk);
    check(busy_cycles == 2048, $sformatf("busy for %0d clocks", busy_cycles));
    best = 1 << 30; bestoff = 0;
    for (int off = 0; off < 20; off++) begin
      mism = 0;
      for (int n = 0; n < ei.size(); n++)
        if (off + n >= gi.size() || gi[off + n] != ei[n] || gq[off + n] != eq[n]) mism++;
      if (mism < best) begin best = mism; bestoff = off; end
    end
    check(best == 0, $sformatf("%0d of %0d samples differ (offset %0d)", best, ei.size(), bestoff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
