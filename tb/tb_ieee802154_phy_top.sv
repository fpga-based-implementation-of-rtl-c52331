// End-to-end test of the multi-PHY baseband at its default parameters.
//
// For each frame the test selects the PHY option over the command channel,
// sends a complete PPDU (preamble, SFD, PHR, PSDU) through the transmit
// FIFO channel, records the DAC bus, and plays the recording back into the
// ADC bus: each transmitted sample is repeated twice (the receiver runs at
// 8 samples per I-branch symbol, the transmitter at 4), rotated by a
// constant carrier phase and preceded by a few idle samples. The received
// PSDU bytes must equal the sent ones, with sof/eof on the first/last.
//
// Frames: option 1/2 with a 30 degree phase offset, a switch to option 3,
// an O-QPSK frame with a 15 degree offset, a switch back to option 1/2
// with another frame, and a final switch to option 3 for the largest frame
// the 7-bit length field allows (127-byte PSDU, 40 degree offset, with
// Gaussian noise added to the replayed samples). The
// test counts each mechanism (option switch, preamble and SFD detection,
// early/late timing corrections, carrier phase tracking, symbol decoding)
// and fails any that never happened.
module tb_ieee802154_phy_top;
  import ieee802154_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_valid = 1'b0;
  logic [31:0] cfg_data = '0;
  logic tx_valid = 1'b0;
  logic tx_ready;
  logic [31:0] tx_data = '0;
  logic signed [11:0] dac_iq;
  logic dac_iqsel, tx_busy;
  logic signed [11:0] adc_iq = '0;
  logic adc_iqsel = 1'b0;
  logic rx_valid, rx_sof, rx_eof, opt3_sel;
  logic [7:0] rx_data;
  logic [1:0] rx_state;
  logic [16:0] ed_mag;

  ieee802154_phy_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_switch = 0, n_pre = 0, n_sfd = 0, n_adv = 0, n_ret = 0, n_sym = 0, n_frames = 0;
  int max_theta = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, read from inside the design.
  always @(posedge clk) if (rst_n) begin
    if (dut.switched) n_switch++;
    if (dut.pre12 || dut.pre3) n_pre++;
    if (dut.sfd12 || dut.sfd3) n_sfd++;
    if (dut.u_rxfe.u_ted.adv) n_adv++;
    if (dut.u_rxfe.u_ted.ret) n_ret++;
    if (dut.u_dec3.sym_valid || dut.u_dec12.sym_valid) n_sym++;
    if ((dut.theta > 0 ? int'(dut.theta) : -int'(dut.theta)) > max_theta)
      max_theta = (dut.theta > 0 ? int'(dut.theta) : -int'(dut.theta));
  end

  // Watchdog.
  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ri[$], rq[$];
  byte unsigned got[$];
  int got_sof, got_eof;

  always @(posedge clk) if (rx_valid) begin
    got.push_back(rx_data);
    if (rx_sof) got_sof = got.size();
    if (rx_eof) got_eof = got.size();
  end

  task automatic select_option(input bit opt3);
    @(posedge clk);
    cfg_valid <= 1'b1;
    cfg_data  <= {31'd0, opt3};
    @(posedge clk);
    cfg_valid <= 1'b0;
    repeat (40) @(posedge clk);
    check(opt3_sel == opt3, "option selected");
  endtask

  // Gaussian noise standard deviation (ADC LSBs) on the last frame. The
  // transmitted peak is about 2000 LSBs.
  localparam int NOISE_SIGMA = 300;

  // Clip a value to the 12-bit signed ADC range.
  function automatic logic [11:0] adc_sat(input int v);
    return 12'(v > 2047 ? 2047 : (v < -2048 ? -2048 : v));
  endfunction

  task automatic run_frame(input int len, input real phase_deg, input int lead,
                          input int sigma = 0);
    byte unsigned ppdu[$];
    byte unsigned psdu[$];
    int nwords, idle;
    int seed = 7;
    real c, s;
    ppdu = {8'h00, 8'h00, 8'h00, 8'h00, SFD_BYTE, 8'(len)};
    for (int k = 0; k < len; k++) begin
      psdu.push_back(8'($urandom));
      ppdu.push_back(psdu[k]);
    end
    while (ppdu.size() % 4 != 0) ppdu.push_back(8'h00);
    ppdu.push_back(8'h00); ppdu.push_back(8'h00); ppdu.push_back(8'h00); ppdu.push_back(8'h00);
    nwords = ppdu.size() / 4;
    ri.delete(); rq.delete(); got.delete();
    got_sof = -1; got_eof = -1;

    // Transmit and record the DAC bus.
    fork
      begin
        for (int w = 0; w < nwords; w++) begin
          tx_valid <= 1'b1;
          tx_data  <= {ppdu[4*w+3], ppdu[4*w+2], ppdu[4*w+1], ppdu[4*w]};
          do @(posedge clk); while (!tx_ready);
        end
        tx_valid <= 1'b0;
      end
      begin
        idle = 0;
        @(posedge clk iff tx_busy);
        while (idle < 200) begin
          @(posedge clk);
          if (dac_iqsel) begin
            ri.push_back(int'(dac_iq));
            @(posedge clk);
            rq.push_back(int'(dac_iq));
          end
          idle = tx_busy ? 0 : idle + 1;
        end
      end
    join
    check(ri.size() > 100, "transmitter produced samples");

    // Replay into the ADC bus, rotated, each sample twice.
    c = $cos(phase_deg * 3.14159265 / 180.0);
    s = $sin(phase_deg * 3.14159265 / 180.0);
    for (int k = 0; k < lead; k++) begin
      @(posedge clk); adc_iq <= '0; adc_iqsel <= 1'b1;
      @(posedge clk); adc_iq <= '0; adc_iqsel <= 1'b0;
    end
    for (int k = 0; k < ri.size(); k++) begin
      for (int r = 0; r < 2; r++) begin
        @(posedge clk);
        adc_iq <= adc_sat($rtoi(ri[k] * c - rq[k] * s) + (sigma > 0 ? $dist_normal(seed, 0, sigma) : 0));
        adc_iqsel <= 1'b1;
        @(posedge clk);
        adc_iq <= adc_sat($rtoi(rq[k] * c + ri[k] * s) + (sigma > 0 ? $dist_normal(seed, 0, sigma) : 0));
        adc_iqsel <= 1'b0;
      end
    end
    @(posedge clk); adc_iq <= '0; adc_iqsel <= 1'b1;
    @(posedge clk); adc_iqsel <= 1'b0;
    repeat (100) @(posedge clk);

    check(got.size() == len, $sformatf("received %0d bytes, expected %0d", got.size(), len));
    for (int k = 0; k < len && k < got.size(); k++)
      check(got[k] == psdu[k], $sformatf("byte %0d: got %02x expected %02x", k, got[k], psdu[k]));
    check(got_sof == 1, "sof on first byte");
    check(got_eof == len, "eof on last byte");
    if (got.size() == len) n_frames++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    check(opt3_sel == 1'b0, "reset selects option 1/2");

    run_frame(5, 30.0, 3);
    select_option(1'b1);
    run_frame(8, 15.0, 5);
    select_option(1'b0);
    run_frame(3, -20.0, 1);
    select_option(1'b1);
    run_frame(127, 40.0, 2, NOISE_SIGMA);

    check(n_switch >= 3, "option switches happened");
    check(n_pre >= 4, "preambles detected");
    check(n_sfd >= 4, "SFDs detected");
    check(n_adv > 0, "timing advanced");
    check(n_ret > 0, "timing retarded");
    check(n_sym > 0, "symbols decoded");
    check(max_theta > 1000, "carrier phase tracked");
    check(n_frames == 4, "all frames received");
    $display("switches=%0d preambles=%0d sfds=%0d adv=%0d ret=%0d symbols=%0d max_theta=%0d frames=%0d",
             n_switch, n_pre, n_sfd, n_adv, n_ret, n_sym, max_theta, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
