// Testbench of symbol_correlator: the default (16 complex chip pairs,
// squared magnitude, 12 bits) and the BPSK form (15 real chips, signed
// correlation offset by 15) against correlations computed here with +-1
// arithmetic over random blocks and references; exact matches must give
// 32^2 = 1024 and 30 respectively.
module tb_symbol_correlator;
  logic [0:15] bi, bq, ri, rq;
  logic [0:14] b15, r15;
  logic [11:0] corr;
  logic [5:0]  c15;
  int checks = 0, failures = 0;

  symbol_correlator dut (.blk_i(bi), .blk_q(bq), .ref_i(ri), .ref_q(rq), .corr);
  symbol_correlator #(.N(15), .COMPLEX(1'b0), .SQUARE(1'b0), .OW(6)) dut15 (
    .blk_i(b15), .blk_q('0), .ref_i(r15), .ref_q('0), .corr(c15));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int pm(input bit b);
    return b ? 1 : -1;
  endfunction

  initial begin
    int re, im;
    for (int t = 0; t < 500; t++) begin
      ri = 16'($urandom); rq = 16'($urandom); r15 = 15'($urandom);
      if (t % 5 == 0) begin bi = ri; bq = rq; b15 = r15; end
      else begin bi = 16'($urandom); bq = 16'($urandom); b15 = 15'($urandom); end
      #1;
      re = 0; im = 0;
      for (int k = 0; k < 16; k++) begin
        re += pm(ri[k]) * pm(bi[k]) + pm(rq[k]) * pm(bq[k]);
        im += pm(ri[k]) * pm(bq[k]) - pm(rq[k]) * pm(bi[k]);
      end
      check(int'(corr) == re * re + im * im, $sformatf("complex corr %0d exp %0d", corr, re * re + im * im));
      if (t % 5 == 0) check(corr == 1024, "exact complex match gives 1024");
      re = 0;
      for (int k = 0; k < 15; k++) re += pm(r15[k]) * pm(b15[k]);
      check(int'(c15) == re + 15, $sformatf("real corr %0d exp %0d", c15, re + 15));
      if (t % 5 == 0) check(c15 == 30, "exact real match gives 30");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
