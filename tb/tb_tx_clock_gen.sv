// Testbench of tx_clock_gen: checks the periods of the sample (2 clocks),
// chip (8 clocks) and symbol (120 clocks) enables at the option 1/2
// settings, their coincidence, and that nothing is produced while en is low.
module tb_tx_clock_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic sample_ce, chip_ce, symbol_ce;
  int checks = 0, failures = 0;
  int cyc = 0, last_s = -1, last_c = -1, last_y = -1, n_s = 0, n_c = 0, n_y = 0;

  tx_clock_gen #(.CLK_PER_SAMPLE(2), .SAMPLES_PER_CHIP(4), .CHIPS_PER_SYMBOL(15)) dut (.*);
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

  always @(posedge clk) begin
    cyc++;
    if (rst_n && en) begin
      if (sample_ce) begin
        if (last_s >= 0) check(cyc - last_s == 2, "sample period");
        last_s = cyc; n_s++;
      end
      if (chip_ce) begin
        check(sample_ce, "chip_ce on a sample");
        if (last_c >= 0) check(cyc - last_c == 8, "chip period");
        last_c = cyc; n_c++;
      end
      if (symbol_ce) begin
        check(chip_ce, "symbol_ce on a chip");
        if (last_y >= 0) check(cyc - last_y == 120, "symbol period");
        last_y = cyc; n_y++;
      end
    end else if (rst_n) begin
      check(!sample_ce && !chip_ce && !symbol_ce, "silent while disabled");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    en <= 1;
    #1 check(symbol_ce && chip_ce && sample_ce, "first enable cycle starts a symbol");
    repeat (1200) @(posedge clk);
    en <= 0;
    repeat (50) @(posedge clk);
    check(n_y == 10, $sformatf("symbols %0d", n_y));
    check(n_c == 150, $sformatf("chips %0d", n_c));
    check(n_s == 600, $sformatf("samples %0d", n_s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
