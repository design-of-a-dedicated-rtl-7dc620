// tb_clk_div: checks the clock divider with DIV = 5: the strobe is one
// cycle wide, comes every 5 cycles, the first one 5 cycles after reset, and
// clk_out toggles on each strobe.
module tb_clk_div;
  logic clk = 0, rst = 1, tick, clk_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clk_div #(.DIV(5)) dut (.clk, .rst, .tick, .clk_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, n;
    logic co_prev;
    @(negedge clk); @(negedge clk); rst = 0;
    cyc = 0; last = 0; n = 0; co_prev = clk_out;
    repeat (60) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        check(cyc - last == 5, $sformatf("tick spacing %0d", cyc - last));
        check(clk_out != co_prev, "clk_out toggles with tick");
        co_prev = clk_out;
        last = cyc; n++;
      end else begin
        check(clk_out == co_prev, "clk_out steady between ticks");
      end
    end
    check(n == 12, $sformatf("12 ticks in 60 cycles, got %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
