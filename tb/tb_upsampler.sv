// Testbench of upsampler: with one strobe every 4 sample enables the output
// is the strobed value once and zero on the three samples after it.
module tb_upsampler;
  logic clk = 0, rst_n = 0, sample_ce = 0, stb = 0;
  logic signed [3:0] d = '0, q;
  int checks = 0, failures = 0;
  upsampler #(.W(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic signed [3:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      v = 4'($urandom_range(1, 7));
      sample_ce = 1; stb = (n % 4 == 0); d = v;
      @(negedge clk);
      sample_ce = 0; stb = 0;
      checks++;
      if (q != ((n % 4 == 0) ? v : 4'sd0)) begin failures++; $display("FAIL: sample %0d", n); end
      @(negedge clk);  // no enable: output holds
      checks++;
      if (q != ((n % 4 == 0) ? v : 4'sd0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
