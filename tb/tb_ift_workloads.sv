// tb_ift_workloads: the DC-motor tuning runs that the design is meant for,
// with the three kinds of initial controller and their starting step sizes:
//   slow-damped     rho0 = 0.1, rho1 = 0.2,  gamma = 2.2
//   fast-damped     rho0 = 1.0, rho1 = 1.0,  gamma = 3.2
//   oscillatory     rho0 = 1.0, rho1 = 16.0, gamma = 90.2
//   badly tuned     rho0 = 0.05, rho1 = 0.05, gamma = 0.03 (the start of the
//                   hardware experiment; its gamma is this testbench's choice:
//                   from 0.1 up the first update drives rho1 negative)
// each with the full experiment length N = 1000 and a 1.0 V square-wave
// reference. Only the sample strobe is brought closer (every 64 clocks, ADC
// every 16); the discrete-time behaviour is the same as at the default rate.
//
// For every case the testbench resets the top, then runs 8 tuning cycles,
// pressing the tuning button before each so that every update is taken.
// Per cycle it checks:
//   * experiment#1 processed exactly N samples and experiment#2 N samples
//     plus the switching tick;
//   * the proposed parameters equal rho - gamma * (dJ/drho) / N, computed
//     here from the design's 44-bit gradient sums with the testbench's own
//     fixed-point functions;
//   * the latch put exactly that pair in use.
// It also prints the cost of each experiment#1 run, J = sum(e^2) / 2N, and
// the parameter trajectory. The first run after reset is not aligned with a
// reference step; from the second on each experiment#1 sees the same step
// up, so their costs compare. For the oscillatory start, where gamma is
// large, the cost of the last cycle must be below 3/4 of the second's; for
// the others the parameters move too little in 8 cycles to demand that.
module tb_ift_workloads;
  import ift_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 1000;
  localparam int SMP_DIV = 64;
  localparam int CYCLES = 8;

  logic clk = 0, rst = 1, tune_btn = 0;
  fx_t rho0_init, rho1_init, gamma, e_tol;
  logic [5:0] pwm;
  word_t mon [6];
  fx_t dj_mon [2];
  ift_status_t status;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ift_fpga_top #(.N(N), .SMP_DIV(SMP_DIV), .ADC_DIV(16)) dut (
    .clk, .rst, .tune_btn, .rho0_init, .rho1_init, .gamma, .e_tol, .pwm, .mon, .dj_mon, .status
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (4 * CYCLES * (2 * N + 4) * SMP_DIV + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // samples of each experiment and the cost of experiment#1, every strobe
  real jrun;
  int  n1, n2;
  always @(posedge clk) if (!rst && dut.smp_tick) begin
    if (dut.u_main.y1) begin
      jrun += rreal(longint'(dut.u_main.e)) ** 2;
      n1++;
    end
    if (status.exp2) n2++;
  end

  task automatic run_case(input string name, input real r0, input real r1, input real g);
    longint p0, p1, gm, e0, e1;
    real j_first, j_second, j_last;
    p0 = rfx(r0); p1 = rfx(r1); gm = rfx(g);
    rho0_init = fx_t'(p0); rho1_init = fx_t'(p1); gamma = fx_t'(gm); e_tol = fx_t'(rfx(0.05));
    rst = 1; repeat (4) @(negedge clk); rst = 0;
    for (int c = 0; c < CYCLES; c++) begin
      jrun = 0; n1 = 0; n2 = 0;
      tune_btn = 1; repeat (5) @(negedge clk); tune_btn = 0;
      wait (status.upd_event);
      // the update is computed from the sums as they stand at the switch
      e0 = rsub(p0, rmul(gm, sat((longint'(dut.u_main.dj0) * 1049) >>> 20)));
      e1 = rsub(p1, rmul(gm, sat((longint'(dut.u_main.dj1) * 1049) >>> 20)));
      @(negedge clk);
      check(longint'(dut.rho0_new) == e0 && longint'(dut.rho1_new) == e1,
            $sformatf("%s cycle %0d: proposed %f %f, expected %f %f", name, c,
                      rreal(longint'(dut.rho0_new)), rreal(longint'(dut.rho1_new)), rreal(e0), rreal(e1)));
      @(negedge clk);
      check(longint'(dut.rho0) == e0 && longint'(dut.rho1) == e1, $sformatf("%s cycle %0d: update taken", name, c));
      check(n1 == N, $sformatf("%s cycle %0d: experiment#1 took %0d samples", name, c, n1));
      check(n2 == N + 1, $sformatf("%s cycle %0d: experiment#2 took %0d strobes", name, c, n2));
      if (c == 0) j_first = jrun / (2.0 * N);
      if (c == 1) j_second = jrun / (2.0 * N);
      j_last = jrun / (2.0 * N);
      $display("%s cycle %0d: J = %f, rho0 %f -> %f, rho1 %f -> %f", name, c, jrun / (2.0 * N),
               rreal(p0), rreal(e0), rreal(p1), rreal(e1));
      p0 = e0; p1 = e1;
    end
    $display("%s: J first cycle %f, second %f, last %f", name, j_first, j_second, j_last);
    // from the second cycle on every experiment#1 starts on a step up
    if (name == "oscillatory")
      check(j_last < 0.75 * j_second, "oscillatory start: tuning lowers the cost");
  endtask

  initial begin
    run_case("slow-damped", 0.1, 0.2, 2.2);
    run_case("fast-damped", 1.0, 1.0, 3.2);
    run_case("oscillatory", 1.0, 16.0, 90.2);
    run_case("badly-tuned", 0.05, 0.05, 0.03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
