// Testbench of hw_switch: registered selection of a (sel = 0) or b
// (sel = 1), and zero output while ce is low.
module tb_hw_switch;
  logic clk = 0, rst_n = 0, ce = 0, sel = 0;
  logic [12:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;
  hw_switch #(.W(13)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [12:0] e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      a = 13'($urandom); b = 13'($urandom); sel = 1'($urandom); ce = (n % 7 != 3);
      e = !ce ? '0 : (sel ? b : a);
      @(negedge clk);
      checks++;
      if (y != e) begin failures++; $display("FAIL: case %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
