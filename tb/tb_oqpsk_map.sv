// Testbench of oqpsk_map: even chips strobe I, odd chips strobe Q, with
// chip 1 -> +1 and chip 0 -> -1; no strobe without chip_stb.
module tb_oqpsk_map;
  logic chip_stb, chip, chip_odd, i_stb, q_stb;
  logic signed [3:0] i_sym, q_sym;
  int checks = 0, failures = 0;
  oqpsk_map dut (.*);
  initial begin
    #10000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 8; n++) begin
      {chip_stb, chip, chip_odd} = 3'(n); #1;
      checks++;
      if (i_stb != (chip_stb && !chip_odd) || q_stb != (chip_stb && chip_odd)) failures++;
      if (chip_stb) begin
        checks++;
        if ((chip_odd ? q_sym : i_sym) != (chip ? 4'sd1 : -4'sd1)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
