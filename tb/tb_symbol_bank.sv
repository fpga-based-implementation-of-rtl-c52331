// Testbench of symbol_bank: every one of the 16 O-QPSK symbols, clean and
// with up to 4 chip errors, must be decoded with its correlation value
// exactly four cycles after start; blocks are also started back to back
// (one per cycle) to check the pipelined tree.
module tb_symbol_bank;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, valid;
  logic [0:15] blk_i = '0, blk_q = '0;
  logic [3:0] symbol;
  logic [11:0] best;
  int checks = 0, failures = 0;

  symbol_bank dut (.*);
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

  task automatic make(input int s, input int nerr, output logic [0:15] bi, output logic [0:15] bq);
    int p;
    for (int k = 0; k < 16; k++) begin
      bi[k] = oqpsk_chip(s, 2 * k);
      bq[k] = oqpsk_chip(s, 2 * k + 1);
    end
    for (int e = 0; e < nerr; e++) begin
      p = (7 * e + s) % 32;
      if (p % 2 == 0) bi[p / 2] = !bi[p / 2]; else bq[p / 2] = !bq[p / 2];
    end
  endtask

  // Expected outputs, indexed by cycle of start.
  int exp_sym [$], exp_best [$], exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && valid) begin
      check(exp_cyc.size() > 0, $sformatf("unexpected valid at %0d", cyc));
      if (exp_cyc.size() > 0) begin
        check(cyc == exp_cyc[0] + 4, $sformatf("latency %0d", cyc - exp_cyc[0]));
        check(symbol == 4'(exp_sym[0]), $sformatf("symbol %0d exp %0d", symbol, exp_sym[0]));
        if (exp_best[0] >= 0) check(int'(best) == exp_best[0], $sformatf("best %0d exp %0d", best, exp_best[0]));
        void'(exp_cyc.pop_front()); void'(exp_sym.pop_front()); void'(exp_best.pop_front());
      end
    end
  end

  initial begin
    logic [0:15] bi, bq;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int nerr = 0; nerr <= 4; nerr++)
      for (int s = 0; s < 16; s++) begin
        make(s, nerr, bi, bq);
        @(negedge clk);
        blk_i = bi; blk_q = bq; start = 1;
        exp_cyc.push_back(cyc); exp_sym.push_back(s);
        exp_best.push_back(nerr == 0 ? 1024 : -1);
        @(negedge clk);
        start = 0;
        if (s % 2 == 0) repeat (6) @(negedge clk);  // odd symbols follow back to back
      end
    repeat (10) @(negedge clk);
    check(exp_cyc.size() == 0, "every block produced a symbol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
