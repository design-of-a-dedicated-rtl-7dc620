// tb_exp_counter: N = 5. Checks counting 0..5, the status at count = N, the
// sample index, restart at 1 when counting on from N, hold without strobe
// and clear.
module tb_exp_counter;
  logic clk = 0, rst = 1, en = 0, clr = 0;
  logic [2:0] count, idx;
  logic at_n;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  exp_counter #(.N(5)) dut (.clk, .rst, .en, .clr, .count, .idx, .at_n);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    @(negedge clk); @(negedge clk); rst = 0;
    m = 0;
    for (int i = 0; i < 23; i++) begin
      check(int'(count) == m, $sformatf("count %0d exp %0d", count, m));
      check(at_n == (m == 5), "at_n");
      check(int'(idx) == ((m == 5) ? 0 : m), "idx");
      en = (i % 3 != 2);
      @(negedge clk);
      if (en) m = (m == 5) ? 1 : m + 1;
      en = 0;
    end
    clr = 1; en = 1; @(negedge clk); clr = 0; en = 0;
    check(count == 0, "clear wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
