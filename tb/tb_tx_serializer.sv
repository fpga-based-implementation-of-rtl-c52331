// Testbench of tx_serializer: words are handed out LSB first, one bit per
// shift (OUT_W = 1) and one nibble per shift (OUT_W = 4); a new word is
// taken exactly when the previous one is used up, and out_valid drops when
// the FIFO is empty.
module tb_tx_serializer;
  logic clk = 0, rst_n = 0, clear = 0;
  logic v1 = 0, v4 = 0, r1, r4, shift = 0, ov1, ov4;
  logic [31:0] d1 = '0, d4 = '0;
  logic [0:0] o1;
  logic [3:0] o4;
  int checks = 0, failures = 0;

  tx_serializer #(.OUT_W(1)) u1 (.clk, .rst_n, .clear, .in_valid(v1), .in_ready(r1), .in_data(d1),
                                 .shift_ce(shift), .out_valid(ov1), .out_data(o1));
  tx_serializer #(.OUT_W(4)) u4 (.clk, .rst_n, .clear, .in_valid(v4), .in_ready(r4), .in_data(d4),
                                 .shift_ce(shift), .out_valid(ov4), .out_data(o4));
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

  logic [31:0] w1 [2], w4 [2];
  int taken1 = 0, taken4 = 0;

  task automatic pulse_shift();
    @(negedge clk); shift = 1; @(negedge clk); shift = 0;
  endtask

  initial begin
    w1[0] = 32'hDEADBEEF; w1[1] = 32'h12345678;
    w4[0] = 32'hA7000000; w4[1] = 32'h0F1E2D3C;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    v1 = 1; d1 = w1[0]; v4 = 1; d4 = w4[0];
    #1 check(!ov1 && !ov4, "empty after reset");
    // 1-bit serializer: 64 bits from two words
    for (int k = 0; k < 64; k++) begin
      bit h1, h4;
      @(negedge clk);
      shift = 1;
      #1 h1 = r1 && v1; h4 = r4 && v4;
      if (h1) taken1++;
      if (h4) taken4++;
      @(negedge clk);
      shift = 0;
      if (h1 && taken1 == 1) d1 = w1[1];
      if (h1 && taken1 == 2) v1 = 0;
      if (h4 && taken4 == 1) d4 = w4[1];
      if (h4 && taken4 == 2) v4 = 0;
      check(ov1 && o1[0] == w1[k/32][k%32], $sformatf("bit %0d", k));
      if (k < 16) check(ov4 && o4 == w4[k/8][4*(k%8) +: 4], $sformatf("nibble %0d", k));
    end
    check(taken1 == 2, "two words taken by 1-bit serializer");
    check(taken4 == 2, "two words taken by 4-bit serializer");
    pulse_shift();
    check(!ov1, "1-bit serializer empty after 64 bits");
    check(!ov4, "4-bit serializer empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
