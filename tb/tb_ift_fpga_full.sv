// tb_ift_fpga_full: complete tuning cycles of the IFT microcontroller at
// its default size: N = 1000 samples per experiment, a sample every 10000
// clocks of 50 MHz (5 kHz), the ADC every 1000 clocks. Three tuning cycles of
// about 20 million clock cycles each.
//
// The controller starts at rho0 = rho1 = 1.0 with gamma = 3.2 and a
// tolerated error of 0.05 V; the tuning button is pressed right after
// reset. Checks:
//   * experiment#1 follows the first reference step: y reaches 1.0 V within
//     0.05 V by the end of the 1000 samples, and the reference steps back to
//     0 on the N-th strobe;
//   * the error check moves to experiment#2 on strobe N+1, i.e. at clock
//     (N+1)*10000 after reset (within 2 clocks);
//   * the update comes one strobe after experiment#2's N samples, at
//     (2N+2)*10000, and the armed latch takes it on the next clock;
//   * the parameters in use then equal rho - gamma*dJ/N computed here from
//     the gradient sums the design reports, and both gradient sums are
//     non-zero.
// Two more tuning cycles follow, one button press each (the reference is
// now restarted on a step up at the start of each cycle); their updates are
// checked the same way, and each cycle must take 2N+2 strobes.
module tb_ift_fpga_full;
  import ift_pkg::*;
  import tb_ref_pkg::*;

  localparam longint N = 1000;
  localparam longint DIV = 10000;

  logic clk = 0, rst = 1, tune_btn = 0;
  fx_t rho0_init, rho1_init, gamma, e_tol;
  logic [5:0] pwm;
  word_t mon [6];
  fx_t dj_mon [2];
  ift_status_t status;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;   // 50 MHz

  ift_fpga_top dut (
    .clk, .rst, .tune_btn, .rho0_init, .rho1_init, .gamma, .e_tol, .pwm, .mon, .dj_mon, .status
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint cyc = 0;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  initial begin
    repeat (65000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    longint t_x, t_upd, mean0, mean1, exp0, exp1, g, dj0, dj1, r0, r1;
    r0 = rfx(1.0); r1 = rfx(1.0); g = rfx(3.2);
    rho0_init = fx_t'(r0); rho1_init = fx_t'(r1); gamma = fx_t'(g); e_tol = fx_t'(rfx(0.05));
    repeat (4) @(negedge clk); rst = 0;
    tune_btn = 1; repeat (10) @(negedge clk); tune_btn = 0;
    check(status.armed, "button armed the latch");

    // end of experiment#1: the output has followed the 1.0 V step
    wait (status.x_event);
    t_x = cyc;
    check(mon[0] == word_t'(0), "reference took its second step on strobe N");
    check(mon[1] > word_t'(1024 - 52) && mon[1] < word_t'(1024 + 52),
          $sformatf("y at end of experiment#1 = %0d (1.0 V = 1024)", mon[1]));
    check(t_x >= (N + 1) * DIV - 2 && t_x <= (N + 1) * DIV + 2,
          $sformatf("experiment#1 ended at clock %0d, expected %0d", t_x, (N + 1) * DIV));
    @(posedge clk); #1;
    check(status.exp2, "in experiment#2");

    wait (status.upd_event);
    t_upd = cyc;
    dj0 = longint'(dut.u_main.dj0);
    dj1 = longint'(dut.u_main.dj1);
    check(t_upd >= (2 * N + 2) * DIV - 2 && t_upd <= (2 * N + 2) * DIV + 3,
          $sformatf("update at clock %0d, expected %0d", t_upd, (2 * N + 2) * DIV));
    check(dj0 != 0 && dj1 != 0, "gradient sums are non-zero");
    mean0 = sat((dj0 * 1049) >>> 20);    // round(2^20/1000) = 1049
    mean1 = sat((dj1 * 1049) >>> 20);
    exp0 = rsub(r0, rmul(g, mean0));
    exp1 = rsub(r1, rmul(g, mean1));
    @(negedge clk); @(negedge clk);
    check(status.latched || !status.armed, "armed latch took the update");
    check(longint'(dut.rho0) == exp0 && longint'(dut.rho1) == exp1,
          $sformatf("parameters %f %f expected %f %f", rreal(longint'(dut.rho0)), rreal(longint'(dut.rho1)),
                    rreal(exp0), rreal(exp1)));
    check(!status.exp2, "back in experiment#1");
    $display("tuned: rho0 %f -> %f, rho1 %f -> %f, dJ/N = %f, %f",
             rreal(r0), rreal(longint'(dut.rho0)), rreal(r1), rreal(longint'(dut.rho1)),
             rreal(mean0), rreal(mean1));
    for (int c = 2; c <= 3; c++) begin
      longint t0;
      r0 = longint'(dut.rho0); r1 = longint'(dut.rho1); t0 = t_upd;
      tune_btn = 1; repeat (10) @(negedge clk); tune_btn = 0;
      wait (status.upd_event);
      t_upd = cyc;
      dj0 = longint'(dut.u_main.dj0);
      dj1 = longint'(dut.u_main.dj1);
      check(t_upd - t0 >= (2 * N + 2) * DIV - 2 && t_upd - t0 <= (2 * N + 2) * DIV + 2,
            $sformatf("cycle %0d took %0d clocks", c, t_upd - t0));
      mean0 = sat((dj0 * 1049) >>> 20);
      mean1 = sat((dj1 * 1049) >>> 20);
      exp0 = rsub(r0, rmul(g, mean0));
      exp1 = rsub(r1, rmul(g, mean1));
      @(negedge clk); @(negedge clk);
      check(longint'(dut.rho0) == exp0 && longint'(dut.rho1) == exp1,
            $sformatf("cycle %0d: parameters %f %f expected %f %f", c, rreal(longint'(dut.rho0)),
                      rreal(longint'(dut.rho1)), rreal(exp0), rreal(exp1)));
      $display("cycle %0d: rho0 %f -> %f, rho1 %f -> %f", c, rreal(r0), rreal(exp0), rreal(r1), rreal(exp1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
