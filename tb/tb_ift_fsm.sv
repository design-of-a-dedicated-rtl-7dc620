// tb_ift_fsm: drives random x and c with random strobes and checks the
// state and outputs against the state diagram: from Exp#1 go to Exp#2 when
// x = 1, else stay; from Exp#2 stay while c = 1, else return; ya/yb flag the
// state, y1 = in Exp#1 and x = 0, y2 = in Exp#2 and c = 1.
module tb_ift_fsm;
  logic clk = 0, rst = 1, en = 0, x = 0, c = 0;
  logic ya, yb, y1, y2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ift_fsm dut (.clk, .rst, .en, .x, .c, .ya, .yb, .y1, .y2);

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
    bit st;          // 0 = Exp#1, 1 = Exp#2
    int to2, to1;
    @(negedge clk); @(negedge clk); rst = 0;
    st = 0; to2 = 0; to1 = 0;
    for (int i = 0; i < 400; i++) begin
      x = $urandom % 4 == 0; c = $urandom % 4 != 0; en = $urandom % 2;
      #1;
      check(ya == !st && yb == st, "Moore outputs");
      check(y1 == (!st && !x) && y2 == (st && c), "Mealy outputs");
      @(negedge clk);
      if (en) begin
        if (!st && x) begin st = 1; to2++; end
        else if (st && !c) begin st = 0; to1++; end
      end
    end
    check(to2 > 5 && to1 > 5, "both transitions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
