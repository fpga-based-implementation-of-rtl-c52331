// Testbench of iq_mux: with a sample pair every two clocks the bus must
// carry I (iqsel = 1) then Q (iqsel = 0) of each pair, in order.
module tb_iq_mux;
  logic clk = 0, rst_n = 0, sample_ce = 0, iqsel;
  logic signed [11:0] i_in = '0, q_in = '0, iq;
  int checks = 0, failures = 0;
  iq_mux #(.W(12)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic signed [11:0] ei, eq;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      ei = 12'($urandom); eq = 12'($urandom);
      sample_ce = 1; i_in = ei; q_in = eq;
      @(negedge clk);
      sample_ce = 0;
      checks++; if (!(iqsel && iq == ei)) begin failures++; $display("FAIL: I %0d", n); end
      @(negedge clk);
      checks++; if (!(!iqsel && iq == eq)) begin failures++; $display("FAIL: Q %0d", n); end
      sample_ce = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
