// Testbench of iq_demux: an interleaved I/Q bus must come out as the same
// pairs, one sample_ce per pair, one clock after the Q word; a lone Q word
// is ignored.
module tb_iq_demux;
  logic clk = 0, rst_n = 0, iqsel = 0, sample_ce;
  logic signed [11:0] iq = '0, i_out, q_out;
  int checks = 0, failures = 0, nce = 0;
  iq_demux #(.W(12)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && sample_ce) nce++;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic signed [11:0] ei, eq;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); iqsel = 0; iq = 12'sd5;  // lone Q word
    @(negedge clk);
    for (int n = 0; n < 50; n++) begin
      ei = 12'($urandom); eq = 12'($urandom);
      iqsel = 1; iq = ei;
      @(negedge clk);
      iqsel = 0; iq = eq;
      @(negedge clk);
      checks++;
      if (!(sample_ce && i_out == ei && q_out == eq)) begin failures++; $display("FAIL: pair %0d", n); end
    end
    @(negedge clk);
    checks++; if (nce != 50) begin failures++; $display("FAIL: %0d enables", nce); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
