// Testbench of bit_to_chip: for bits 0 and 1 the 15 chips must be the
// standard's sequence 111101011001000 and its inverse, in order.
module tb_bit_to_chip;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, symbol_ce = 0, chip_ce = 0, bit_in = 0, chip;
  int checks = 0, failures = 0;

  bit_to_chip dut (.*);
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
    for (int b = 0; b < 6; b++) begin
      for (int k = 0; k < 15; k++) begin
        @(negedge clk);
        chip_ce = 1; symbol_ce = (k == 0);
        @(negedge clk);
        chip_ce = 0; symbol_ce = 0;
        if (k == 0) bit_in = b[0] ^ b[2];
        #1 check(chip == bpsk_chip(bit_in, k), $sformatf("bit %0d chip %0d", b, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
