// tb_ref_gen: checks the reference generator with HALF = 3: r starts at the
// amplitude (1.0 V = 1024) and steps between 1024 and 0 every 3 strobes;
// it does not move without a strobe. Then a restart, given in the low half
// and again in the high half, must bring r to 1024 at once and give a full
// high half of 3 strobes followed by 3 low and the next high.
// A second instance in single-step mode with a 1.2 V amplitude (1229) must
// hold 1229 from reset through every strobe and restart.
module tb_ref_gen;
  import ift_pkg::*;
  logic clk = 0, rst = 1, en = 0, restart = 0;
  word_t r, r1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ref_gen #(.HALF(3)) dut (.clk, .rst, .en, .restart, .r);
  ref_gen #(.HALF(3), .AMP(word_t'(1229)), .SINGLE(1'b1)) dut1 (.clk, .rst, .en, .restart, .r(r1));

  // single-step instance: checked on every clock after reset
  always @(negedge clk) if (!rst) check(r1 == word_t'(1229), $sformatf("single step holds, r=%0d", r1));

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
    int k;
    int expv;
    @(negedge clk); @(negedge clk); rst = 0;
    check(r == 12'sd1024, "starts at 1.0 V");
    for (k = 1; k <= 20; k++) begin
      @(negedge clk); en = 1; @(negedge clk); en = 0;
      // after k strobes the level is high when (k / 3) is even
      expv = ((k / 3) % 2 == 0) ? 1024 : 0;
      check(int'(r) == expv, $sformatf("after %0d strobes r=%0d exp %0d", k, r, expv));
      repeat (3) @(negedge clk);
      check(int'(r) == expv, "holds between strobes");
    end
    // restart in the low half (after 20 strobes: 20/3 = 6, high) and the high half
    for (int t = 0; t < 2; t++) begin
      repeat (t == 0 ? 2 : 1) begin @(negedge clk); en = 1; @(negedge clk); en = 0; end
      check(int'(r) == (t == 0 ? 0 : 1024), $sformatf("level before restart %0d", t));
      @(negedge clk); restart = 1; @(negedge clk); restart = 0;
      check(int'(r) == 1024, "restart sets the high level at once");
      for (k = 1; k <= 6; k++) begin
        @(negedge clk); en = 1; @(negedge clk); en = 0;
        expv = ((k / 3) % 2 == 0) ? 1024 : 0;
        check(int'(r) == expv, $sformatf("restart %0d: after %0d strobes r=%0d exp %0d", t, k, r, expv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
