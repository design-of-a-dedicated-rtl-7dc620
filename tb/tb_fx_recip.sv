// tb_fx_recip: reciprocal unit. For random divisors of both signs, checks
// q = trunc(2^40/|d|) with the sign of d, saturation for tiny |d| and d = 0,
// and that the result is ready within 45 cycles of start.
module tb_fx_recip;
  import ift_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, valid;
  fx_t d, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fx_recip dut (.clk, .rst, .start, .d, .valid, .q);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint dv, ad, expq;
    int cyc;
    d = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      case (i % 6)
        0: dv = 0;
        1: dv = 64'(($urandom % 300) + 1);        // tiny: saturates
        2: dv = rfx(1.0);
        default: dv = rrand(60.0);
      endcase
      d = fx_t'(dv); start = 1; @(negedge clk); start = 0;
      check(!valid, "valid drops at start");
      cyc = 0;
      while (!valid && cyc < 60) begin @(negedge clk); cyc++; end
      check(cyc <= 45, $sformatf("latency %0d", cyc));
      ad = (dv < 0) ? -dv : dv;
      if (ad == 0) expq = FMAX;
      else begin
        expq = (64'sd1 <<< 40) / ad;
        if (expq > FMAX) expq = (dv < 0) ? FMIN : FMAX;
        else if (dv < 0) expq = -expq;
      end
      check(longint'(q) == expq, $sformatf("d=%0d q=%0d exp %0d", dv, q, expq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
