// tb_ift_fpga_top: end-to-end test of the whole IFT microcontroller with the
// embedded DC-motor model, at N = 128 samples per experiment and a sample
// strobe every 64 clocks (ADC every 16) to keep the run short.
//
// Phase 1 (tolerated error very large): experiment#1 repeats and the PI
// controller with rho0 = rho1 = 1.0 just regulates. Checks: the output
// settles to each reference level (within 0.05 V before every step), and a
// PWM channel carries its monitored word as duty cycle.
// Phase 2 (tolerated error 0.05 V): tuning cycles run. Checks: each
// gradient experiment lasts N+1 sample strobes (N samples and the switching
// tick), an update is proposed after every one, an update without a button
// press leaves the parameters alone, and after one press exactly one update
// reaches the parameters, equal to the value that was proposed.
// Mechanisms counted (each must happen): reference steps, experiment#1
// repeats, error-check transitions to experiment#2, parameter updates,
// updates rejected for lack of a press, updates latched.
module tb_ift_fpga_top;
  import ift_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 128;
  localparam int SMP_DIV = 64;

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
    #40000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---- event counters, sampled every clock ----
  int n_step = 0, n_repeat = 0, n_x = 0, n_upd = 0, n_reject = 0, n_latch = 0;
  int exp2_ticks = 0;
  bit in_tuning = 0;
  word_t r_prev = '0;
  fx_t last_new0, last_new1;
  always @(posedge clk) if (!rst) begin
    if (mon[0] != r_prev) n_step++;
    r_prev <= mon[0];
    if (status.repeat1) n_repeat++;
    if (status.x_event) begin n_x++; exp2_ticks = 0; end
    if (dut.smp_tick && status.exp2) exp2_ticks++;
    if (status.upd_event) begin
      n_upd++;
      last_new0 = dut.rho0_new; last_new1 = dut.rho1_new;
      if (n_x > 0) check(exp2_ticks == N + 1, $sformatf("gradient experiment took %0d strobes", exp2_ticks));
      if (!status.armed) n_reject++;
    end
    if (status.latched) n_latch++;
  end

  // the loop output just before each reference step must have settled
  int smp_in_level = 0;
  int settle_checks = 0;
  always @(posedge clk) if (!rst && dut.smp_tick) begin
    smp_in_level = (smp_in_level + 1) % N;
    if (!in_tuning && smp_in_level == N - 1 && n_step > 1) begin
      longint dv;
      dv = longint'(mon[1]) - longint'(mon[0]);
      check(dv < 52 && dv > -52, $sformatf("settled: y=%0d r=%0d", mon[1], mon[0]));
      settle_checks++;
    end
  end

  initial begin
    int highs;
    fx_t before0, before1;
    rho0_init = fx_t'(rfx(1.0)); rho1_init = fx_t'(rfx(1.0));
    gamma = fx_t'(rfx(3.2)); e_tol = fx_t'(rfx(100.0));
    repeat (4) @(negedge clk); rst = 0;

    // ---- phase 1: regulation only ----
    repeat (8 * N * SMP_DIV) @(negedge clk);
    check(settle_checks >= 5, $sformatf("%0d settling checks", settle_checks));
    check(n_x == 0 && n_upd == 0, "no tuning while the error is tolerated");
    // PWM channel 4 carries rho0 as duty (word + 2048) / 4096
    wait (dut.g_dac[4].u_dac.cnt == 12'hFFF); @(posedge clk); #1;
    highs = 0;
    repeat (4096) begin @(posedge clk); #1; if (pwm[4]) highs++; end
    check(highs == int'(mon[4]) + 2048, $sformatf("PWM rho0 duty %0d for word %0d", highs, mon[4]));
    check(mon[4] == word_t'(1024) && mon[5] == word_t'(1024), "initial parameters 1.0/1.0");

    // ---- phase 2: tuning cycles ----
    @(negedge clk);
    in_tuning = 1;
    e_tol = fx_t'(rfx(0.05));
    wait (n_upd >= 2);
    @(negedge clk);
    check(n_reject >= 1, "update without a button press rejected");
    check(dut.rho0 == rho0_init && dut.rho1 == rho1_init, "parameters unchanged without press");
    // one press: exactly one update gets through
    tune_btn = 1; repeat (10) @(negedge clk); tune_btn = 0;
    check(status.armed, "button arms the latch");
    before0 = dut.rho0; before1 = dut.rho1;
    // the next proposed update must be taken (within two tuning cycles)
    for (int t = 0; t < 2 * (3 * N + 4) * SMP_DIV && n_latch == 0; t++) @(negedge clk);
    check(n_latch == 1, "armed latch took an update");
    @(negedge clk);
    check(dut.rho0 == last_new0 && dut.rho1 == last_new1, "latched parameters equal the proposed update");
    check(dut.rho0 != before0 || dut.rho1 != before1, "the update changed the parameters");
    check(mon[4] == fx_to_word(dut.rho0), "rho0 monitor follows the latch");
    begin
      int upd_at_latch;
      fx_t held0, held1;
      upd_at_latch = n_upd; held0 = dut.rho0; held1 = dut.rho1;
      wait (n_upd >= upd_at_latch + 2);
      @(negedge clk);
      check(n_latch == 1, "only one update per press");
      check(dut.rho0 == held0 && dut.rho1 == held1, "parameters held after the latched update");
    end

    $display("mechanisms: steps=%0d repeats=%0d x=%0d updates=%0d rejected=%0d latched=%0d",
             n_step, n_repeat, n_x, n_upd, n_reject, n_latch);
    check(n_step > 0, "reference step happened");
    check(n_repeat > 0, "experiment#1 repeat happened");
    check(n_x > 0, "transition to experiment#2 happened");
    check(n_upd > 0, "parameter update happened");
    check(n_reject > 0, "rejected update happened");
    check(n_latch > 0, "latched update happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
