// Testbench of hw_reconf: reset selects option 1/2; a command for option 3
// drops every enable for FLUSH_CYCLES clocks and then enables only the
// option 3 IPs and the switches; a repeated command changes nothing; a
// command back to option 1/2 flushes again.
module tb_hw_reconf;
  import ieee802154_pkg::*;
  logic clk = 0, rst_n = 0, cfg_valid = 0;
  logic [31:0] cfg_data = '0;
  phy_opt_e opt_sel;
  logic tx_opt12_ce, tx_opt3_ce, tx_switch_ce, rx_opt12_ce, rx_opt3_ce, rx_switch_ce, switched;
  int checks = 0, failures = 0;
  hw_reconf #(.FLUSH_CYCLES(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [5:0] ces();
    return {tx_opt12_ce, tx_opt3_ce, tx_switch_ce, rx_opt12_ce, rx_opt3_ce, rx_switch_ce};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic command(input bit opt3);
    @(negedge clk); cfg_valid = 1; cfg_data = {31'd0, opt3};
    @(negedge clk); cfg_valid = 0;
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(opt_sel == PHY_OPT12 && ces() == 6'b101101, "reset: option 1/2 enabled");
    command(1'b1);
    n = 0;
    while (ces() == 6'b000000 && n < 100) begin @(negedge clk); n++; end
    check(n == 16, $sformatf("flush lasted %0d cycles", n));
    check(opt_sel == PHY_OPT3 && ces() == 6'b011011, "option 3 enabled");
    command(1'b1);
    repeat (5) @(negedge clk);
    check(opt_sel == PHY_OPT3 && ces() == 6'b011011, "repeat command ignored");
    command(1'b0);
    #1 check(ces() == 6'b000000, "flushing");
    repeat (20) @(negedge clk);
    check(opt_sel == PHY_OPT12 && ces() == 6'b101101, "back to option 1/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
