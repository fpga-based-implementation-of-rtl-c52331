// Testbench of decoder_fsm at its default (4-bit symbols, 16 chip pairs per
// symbol). A chip strobe runs every 4 clocks; a model of the symbol bank
// answers each blk_start with the next queued symbol 4 cycles later. Checks:
// preamble -> SFD -> PHR -> data state walk, blk_start every 16 chips,
// bytes packed low nibble first with sof/eof, return to preamble search,
// a zero-length frame, the SFD timeout after exactly 256 chips, and en.
module tb_decoder_fsm;
  logic clk = 0, rst_n = 0, en = 0, chip_valid = 0, pre_hit = 0, sfd_hit = 0, sym_valid;
  logic [3:0] sym;
  logic [1:0] state;
  logic blk_start, byte_valid, sof, eof;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;

  decoder_fsm dut (.*);
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

  int cyc = 0, chips = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    chip_valid <= (cyc % 4 == 0);
    if (chip_valid) chips <= chips + 1;
  end

  // Symbol bank model.
  int syms [$];
  int last_blk = -1, blk_gaps_bad = 0, nblk = 0;
  logic [3:0] pipe [4];
  logic [3:0] vpipe = '0;
  always @(posedge clk) begin
    vpipe <= {vpipe[2:0], blk_start};
    pipe[0] <= (blk_start && syms.size() > 0) ? 4'(syms.pop_front()) : 4'd0;
    for (int k = 1; k < 4; k++) pipe[k] <= pipe[k-1];
    if (rst_n && blk_start) begin
      nblk++;
      if (last_blk >= 0 && cyc - last_blk != 64) blk_gaps_bad++;
      last_blk = cyc;
    end
  end
  assign sym_valid = vpipe[3];
  assign sym = pipe[3];

  byte unsigned got [$];
  int sofs [$], eofs [$];
  always @(posedge clk) if (rst_n && byte_valid) begin
    got.push_back(byte_data);
    if (sof) sofs.push_back(got.size());
    if (eof) eofs.push_back(got.size());
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    repeat (10) @(negedge clk);
    check(state == 0, "starts in preamble search");
    // Frame: PHR = 3, data 5A C3 7E (low nibble first).
    syms = '{3, 0, 4'hA, 4'h5, 4'h3, 4'hC, 4'hE, 4'h7};
    pulse(pre_hit);
    check(state == 1, "preamble hit -> SFD search");
    repeat (37) @(negedge clk);
    pulse(sfd_hit);
    check(state == 2, "SFD hit -> PHR");
    wait (got.size() == 1);
    #1 check(state == 3, "data state");
    wait (state == 0);
    repeat (200) @(negedge clk);
    check(got.size() == 3, $sformatf("%0d bytes", got.size()));
    if (got.size() == 3) check(got[0] == 8'h5A && got[1] == 8'hC3 && got[2] == 8'h7E,
                               $sformatf("bytes %02x %02x %02x", got[0], got[1], got[2]));
    check(sofs.size() == 1 && sofs[0] == 1, "sof on first byte");
    check(eofs.size() == 1 && eofs[0] == 3, "eof on last byte");
    check(nblk == 8 && blk_gaps_bad == 0, $sformatf("%0d blocks, %0d bad gaps", nblk, blk_gaps_bad));
    // Zero length frame.
    syms = '{0, 0};
    pulse(pre_hit); pulse(sfd_hit);
    repeat (2 * 64 + 20) @(negedge clk);
    check(state == 0 && got.size() == 3, "zero length returns without bytes");
    // SFD timeout.
    begin
      int c0;
      pulse(pre_hit);
      c0 = chips;
      wait (chips == c0 + 255);
      @(negedge clk);
      check(state == 1, "still waiting after 255 chips");
      wait (chips == c0 + 257);
      @(negedge clk);
      check(state == 0, "timeout after 256 chips");
    end
    // en low
    pulse(pre_hit);
    check(state == 1, "armed");
    @(negedge clk); en = 0; @(negedge clk);
    check(state == 0, "en low returns to preamble search");
    en = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
