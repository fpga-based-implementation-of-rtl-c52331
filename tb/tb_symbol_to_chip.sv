// Testbench of symbol_to_chip: every one of the 16 symbols must produce its
// 32 chips of the standard's table, in order, with chip_odd on odd chips.
module tb_symbol_to_chip;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, symbol_ce = 0, chip_ce = 0, chip, chip_odd;
  logic [3:0] symbol = '0;
  int checks = 0, failures = 0;

  symbol_to_chip dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 16; s++) begin
      for (int k = 0; k < 32; k++) begin
        @(negedge clk);
        chip_ce = 1; symbol_ce = (k == 0);
        @(negedge clk);
        chip_ce = 0; symbol_ce = 0;
        if (k == 0) symbol = 4'(s);
        #1 check(chip == oqpsk_chip(s, k) && chip_odd == k[0], $sformatf("symbol %0d chip %0d", s, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
