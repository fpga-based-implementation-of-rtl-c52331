// Testbench of decoder_opt12 (BPSK detector) at its defaults. Chips of whole
// frames (preamble 4 x 0x00, SFD 0xA7, PHR, PSDU; bits LSB first,
// differentially encoded, spread to 15 chips; a chip decision is 1 for a
// positive sample, i.e. for spreading chip 0) arrive one every 16 clocks
// between random chips. Frame 1 is clean, frame 2 is inverted (180-degree
// carrier ambiguity), frame 3 starts from the other encoder state and has
// one chip error in every bit. Checks:
// preamble and SFD detection, PSDU bytes, sof/eof, and one byte every
// 8 x 15 chips x 16 clocks = 1920 clocks.
module tb_decoder_opt12;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, chip_valid = 0, chip_i = 0;
  logic [1:0] state;
  logic pre_det, sfd_det, byte_valid, sof, eof;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;

  decoder_opt12 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
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
      if (last_b >= 0 && cyc - last_b != 1920) bad_gap++;
      last_b = cyc;
      got.push_back(byte_data);
      if (sof) sof_at = got.size();
      if (eof) eof_at = got.size();
    end
  end

  task automatic send_chip(input bit a);
    @(negedge clk);
    chip_i = a; chip_valid = 1;
    @(negedge clk);
    chip_valid = 0;
    repeat (14) @(negedge clk);
  endtask

  task automatic frame(input int len, input bit inv, input bit errs, input bit e0);
    byte unsigned ppdu [$];
    byte unsigned psdu [$];
    bit e, c;
    int p;
    ppdu = '{8'h00, 8'h00, 8'h00, 8'h00, 8'hA7, 8'(len)};
    for (int k = 0; k < len; k++) begin psdu.push_back(8'($urandom)); ppdu.push_back(psdu[k]); end
    got.delete(); sof_at = -1; eof_at = -1; n_pre = 0; n_sfd = 0; last_b = -1; bad_gap = 0;
    for (int k = 0; k < 100; k++) send_chip($urandom_range(0, 1));
    e = e0;  // encoder state before the preamble
    for (int b = 0; b < ppdu.size(); b++)
      for (int i = 0; i < 8; i++) begin
        e = e ^ ppdu[b][i];
        p = errs ? $urandom_range(0, 14) : -1;
        for (int k = 0; k < 15; k++) begin
          c = !bpsk_chip(e, k) ^ inv;
          if (k == p) c = !c;
          send_chip(c);
        end
      end
    for (int k = 0; k < 100; k++) send_chip($urandom_range(0, 1));
    check(n_pre >= 1, "preamble detected");
    check(n_sfd == 1, $sformatf("SFD detected %0d times", n_sfd));
    check(got.size() == len, $sformatf("%0d bytes, expected %0d", got.size(), len));
    for (int k = 0; k < len && k < got.size(); k++)
      check(got[k] == psdu[k], $sformatf("byte %0d: %02x expected %02x", k, got[k], psdu[k]));
    check(sof_at == 1 && eof_at == len, "sof/eof");
    check(bad_gap == 0, "one byte every 1920 clocks");
    check(state == 0, "back to preamble search");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    frame(6, 0, 0, 0);
    frame(5, 1, 0, 0);
    frame(8, 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
