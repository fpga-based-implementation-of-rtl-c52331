// Testbench of bpsk_map: chip 0 -> +1, chip 1 -> -1.
module tb_bpsk_map;
  logic chip;
  logic signed [3:0] sym;
  int checks = 0, failures = 0;
  bpsk_map dut (.*);
  initial begin
    #1000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    chip = 0; #1; checks++; if (sym != 4'sd1) failures++;
    chip = 1; #1; checks++; if (sym != -4'sd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
