// tb_dc_motor_model: drives the motor model with a sequence of input levels
// and compares y after every sample with a reference recursion
// y = 0.904837 y + 0.09516 u computed here; also checks that the step
// response to u = 1.0 approaches the DC gain 0.09516/(1-0.904837) = 1.0
// (within 1 %) and follows a first-order step response with that gain and
// time constant 2 s, g(1-exp(-t/2)), sampled every 0.2 s (within 1e-3).
module tb_dc_motor_model;
  import ift_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  fx_t u, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dc_motor_model dut (.clk, .rst, .en, .u, .y);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ym, am, bm, uv;
    real yc;
    am = rfx(0.904837); bm = rfx(0.09516);
    u = '0; ym = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int t = 1; t <= 100; t++) begin
      uv = rfx(1.0);
      u = fx_t'(uv); en = 1; @(negedge clk); en = 0;
      ym = radd(rmul(am, ym), rmul(bm, uv));
      check(longint'(y) == ym, $sformatf("t=%0d y=%0d exp %0d", t, y, ym));
      // first-order step response, gain 0.09516/(1-0.904837), tau = 2 s
      yc = (0.09516 / (1.0 - 0.904837)) * (1.0 - $exp(-0.2 * t / 2.0));
      check((rreal(longint'(y)) - yc) < 1e-3 && (yc - rreal(longint'(y))) < 1e-3,
            $sformatf("t=%0d y=%f continuous %f", t, rreal(longint'(y)), yc));
    end
    check(rreal(longint'(y)) > 0.99 && rreal(longint'(y)) < 1.01, "DC gain about 1.0");
    for (int t = 0; t < 100; t++) begin
      uv = rrand(3.0);
      u = fx_t'(uv); en = 1; @(negedge clk); en = 0;
      ym = radd(rmul(am, ym), rmul(bm, uv));
      check(longint'(y) == ym, "random input");
      @(negedge clk);
      check(longint'(y) == ym, "holds without strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
