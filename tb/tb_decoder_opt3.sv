// Testbench of decoder_opt3 (O-QPSK detector) at its defaults. Chip pairs
// of whole frames (preamble 4 x 0x00, SFD 0xA7, PHR, PSDU; symbols low
// nibble first, even chips on I, odd on Q) arrive one pair every 16 clocks
// between random chips. Frame 1 is clean, frame 2 has 2 chip errors in every
// symbol, frame 3 is turned by 90 degrees (I/Q -> -Q/I), which the squared
// correlations must ignore. Checks: preamble and SFD detection, PSDU bytes,
// sof/eof, and one byte every 2 x 16 pairs x 16 clocks = 512 clocks.
module tb_decoder_opt3;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, chip_valid = 0, chip_i = 0, chip_q = 0;
  logic [1:0] state;
  logic pre_det, sfd_det, byte_valid, sof, eof;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;

  decoder_opt3 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0, n_pre = 0, n_sfd = 0, last_b = -1, bad_gap = 0;
  byte unsigned got [$];
  int sof_at = -1, eof_at = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pre_det) n_pre++;
    if (sfd_det) n_sfd++;
    if (byte_valid) begin
      if (last_b >= 0 && cyc - last_b != 512) bad_gap++;
      last_b = cyc;
      got.push_back(byte_data);
      if (sof) sof_at = got.size();
      if (eof) eof_at = got.size();
    end
  end

  task automatic send_pair(input bit a, input bit b);
    @(negedge clk);
    chip_i = a; chip_q = b; chip_valid = 1;
    @(negedge clk);
    chip_valid = 0;
    repeat (14) @(negedge clk);
  endtask

  task automatic frame(input int len, input int errs, input bit turn);
    byte unsigned ppdu [$];
    byte unsigned psdu [$];
    bit c [32];
    int s, p0, p1;
    ppdu = '{8'h00, 8'h00, 8'h00, 8'h00, 8'hA7, 8'(len)};
    for (int k = 0; k < len; k++) begin psdu.push_back(8'($urandom)); ppdu.push_back(psdu[k]); end
    got.delete(); sof_at = -1; eof_at = -1; n_pre = 0; n_sfd = 0; last_b = -1; bad_gap = 0;
    for (int k = 0; k < 40; k++) send_pair($urandom_range(0, 1), $urandom_range(0, 1));
    for (int b = 0; b < ppdu.size(); b++)
      for (int h = 0; h < 2; h++) begin
        s = h ? ppdu[b][7:4] : ppdu[b][3:0];
        for (int k = 0; k < 32; k++) c[k] = oqpsk_chip(s, k);
        if (errs > 0) begin
          p0 = $urandom_range(0, 31); p1 = (p0 + 13) % 32;
          c[p0] = !c[p0]; c[p1] = !c[p1];
        end
        for (int k = 0; k < 16; k++)
          if (turn) send_pair(!c[2*k+1], c[2*k]);
          else      send_pair(c[2*k], c[2*k+1]);
      end
    for (int k = 0; k < 40; k++) send_pair($urandom_range(0, 1), $urandom_range(0, 1));
    check(n_pre >= 1, "preamble detected");
    check(n_sfd == 1, $sformatf("SFD detected %0d times", n_sfd));
    check(got.size() == len, $sformatf("%0d bytes, expected %0d", got.size(), len));
    for (int k = 0; k < len && k < got.size(); k++)
      check(got[k] == psdu[k], $sformatf("byte %0d: %02x expected %02x", k, got[k], psdu[k]));
    check(sof_at == 1 && eof_at == len, "sof/eof");
    check(bad_gap == 0, "one byte every 512 clocks");
    check(state == 0, "back to preamble search");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    frame(10, 0, 0);
    frame(20, 2, 0);
    frame(7, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
