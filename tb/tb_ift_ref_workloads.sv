// tb_ift_ref_workloads: the two reference-signal variations of the tuning
// runs, each on its own copy of the top with the fast-damped start
// (rho0 = rho1 = 1.0), N = 1000 and a fast sample strobe (every 64 clocks):
//   dut_s : single-step reference of 1.0 V (SINGLE_STEP = 1), gamma = 3.2
//   dut_a : square wave of 1.2 V amplitude (REF_AMP = 1229), gamma = 1.1,
//           the largest amplitude of the amplitude sweep
// Both run 6 tuning cycles, with one button press per cycle.
// Checks:
//   * dut_s: the reference is 1024 on every clock;
//   * dut_a: the reference only ever takes the values 0 and 1229;
//   * both: at the end of each experiment#1 the output has followed the
//     step (within 0.05 V of 1.0 V or 1.2 V), every proposed update equals
//     rho - gamma*(dJ/drho)/N from the design's own sums, and the latch takes
//     it.
// The cost J = sum(e^2)/2N of each experiment#1 run is printed.
module tb_ift_ref_workloads;
  import ift_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 1000;
  localparam int SMP_DIV = 64;
  localparam int CYCLES = 6;

  logic clk = 0, rst = 1, btn_s = 0, btn_a = 0;
  fx_t rho_init, gamma_s, gamma_a, e_tol;
  logic [5:0] pwm_s, pwm_a;
  word_t mon_s [6], mon_a [6];
  fx_t dj_s [2], dj_a [2];
  ift_status_t st_s, st_a;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ift_fpga_top #(.N(N), .SMP_DIV(SMP_DIV), .ADC_DIV(16), .SINGLE_STEP(1'b1)) dut_s (
    .clk, .rst, .tune_btn(btn_s), .rho0_init(rho_init), .rho1_init(rho_init), .gamma(gamma_s), .e_tol,
    .pwm(pwm_s), .mon(mon_s), .dj_mon(dj_s), .status(st_s)
  );
  ift_fpga_top #(.N(N), .SMP_DIV(SMP_DIV), .ADC_DIV(16), .REF_AMP(word_t'(1229))) dut_a (
    .clk, .rst, .tune_btn(btn_a), .rho0_init(rho_init), .rho1_init(rho_init), .gamma(gamma_a), .e_tol,
    .pwm(pwm_a), .mon(mon_a), .dj_mon(dj_a), .status(st_a)
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat ((CYCLES + 2) * (2 * N + 4) * SMP_DIV + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // reference levels, every clock
  int bad_s = 0, bad_a = 0;
  always @(negedge clk) if (!rst) begin
    if (mon_s[0] != word_t'(1024)) bad_s++;
    if (mon_a[0] != word_t'(0) && mon_a[0] != word_t'(1229)) bad_a++;
  end

  // cost of experiment#1 runs
  real j_s, j_a;
  always @(posedge clk) if (!rst) begin
    if (dut_s.smp_tick && dut_s.u_main.y1) j_s += rreal(longint'(dut_s.u_main.e)) ** 2;
    if (dut_a.smp_tick && dut_a.u_main.y1) j_a += rreal(longint'(dut_a.u_main.e)) ** 2;
  end

  // output level at the end of experiment#1: the last sample taken
  word_t y_end_s, y_end_a;
  always @(posedge clk) begin
    if (st_s.x_event) y_end_s <= mon_s[1];
    if (st_a.x_event) y_end_a <= mon_a[1];
  end

  initial begin
    longint g_s, g_a;
    g_s = rfx(3.2); g_a = rfx(1.1);
    rho_init = fx_t'(rfx(1.0)); gamma_s = fx_t'(g_s); gamma_a = fx_t'(g_a); e_tol = fx_t'(rfx(0.05));
    repeat (4) @(negedge clk); rst = 0;
    fork
      for (int c = 0; c < CYCLES; c++) begin : run_s
        longint p0, p1, e0, e1;
        j_s = 0;
        btn_s = 1; repeat (5) @(negedge clk); btn_s = 0;
        wait (st_s.upd_event);
        p0 = longint'(dut_s.rho0); p1 = longint'(dut_s.rho1);
        e0 = rsub(p0, rmul(g_s, sat((longint'(dut_s.u_main.dj0) * 1049) >>> 20)));
        e1 = rsub(p1, rmul(g_s, sat((longint'(dut_s.u_main.dj1) * 1049) >>> 20)));
        check(longint'(dut_s.rho0_new) == e0 && longint'(dut_s.rho1_new) == e1,
              $sformatf("single step cycle %0d: update", c));
        check(int'(y_end_s) > 1024 - 52 && int'(y_end_s) < 1024 + 52,
              $sformatf("single step cycle %0d: y at end of experiment#1 = %0d", c, y_end_s));
        @(negedge clk); @(negedge clk);
        check(longint'(dut_s.rho0) == e0 && longint'(dut_s.rho1) == e1, $sformatf("single step cycle %0d: taken", c));
        $display("single step 1.0 V cycle %0d: J = %f, rho0 %f -> %f, rho1 %f -> %f", c, j_s / (2.0 * N),
                 rreal(p0), rreal(e0), rreal(p1), rreal(e1));
      end
      for (int c = 0; c < CYCLES; c++) begin : run_a
        longint p0, p1, e0, e1;
        j_a = 0;
        btn_a = 1; repeat (5) @(negedge clk); btn_a = 0;
        wait (st_a.upd_event);
        p0 = longint'(dut_a.rho0); p1 = longint'(dut_a.rho1);
        e0 = rsub(p0, rmul(g_a, sat((longint'(dut_a.u_main.dj0) * 1049) >>> 20)));
        e1 = rsub(p1, rmul(g_a, sat((longint'(dut_a.u_main.dj1) * 1049) >>> 20)));
        check(longint'(dut_a.rho0_new) == e0 && longint'(dut_a.rho1_new) == e1,
              $sformatf("1.2 V cycle %0d: update", c));
        check(int'(y_end_a) > 1229 - 52 && int'(y_end_a) < 1229 + 52,
              $sformatf("1.2 V cycle %0d: y at end of experiment#1 = %0d", c, y_end_a));
        @(negedge clk); @(negedge clk);
        check(longint'(dut_a.rho0) == e0 && longint'(dut_a.rho1) == e1, $sformatf("1.2 V cycle %0d: taken", c));
        $display("square wave 1.2 V cycle %0d: J = %f, rho0 %f -> %f, rho1 %f -> %f", c, j_a / (2.0 * N),
                 rreal(p0), rreal(e0), rreal(p1), rreal(e1));
      end
    join
    check(bad_s == 0, $sformatf("single-step reference left 1024 on %0d clocks", bad_s));
    check(bad_a == 0, $sformatf("1.2 V reference took other values on %0d clocks", bad_a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
