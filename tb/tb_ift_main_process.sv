// tb_ift_main_process: closes the loop of the IFT main process (N = 8) around
// a DC-motor model kept in this testbench, and runs a bit-exact reference
// model of the whole algorithm next to it: the FSM with its x/c conditions,
// the two loop counters, the error memory, both PI controllers, the gradient
// filters and sums, and the update. After every sample strobe it compares
// the plant drive u, the experiment flag and the event strobes, and at every
// update the proposed rho pair. The first runs use a large tolerated error
// so that experiment#1 repeats; then the tolerance drops and the tuning
// cycles run, with updates fed back as the parameters in use (which also
// restarts the reciprocal unit). Every mechanism is counted and must occur.
module tb_ift_main_process;
  import ift_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 8;
  localparam int SPACING = 60;     // clocks between sample strobes

  logic clk = 0, rst = 1, smp_en = 0;
  word_t r, y;
  fx_t rho0, rho1, gamma, e_tol, u, e_mon, rho0_new, rho1_new, dj0_mon, dj1_mon;
  logic exp2, x_event, repeat_event, upd_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ift_main_process #(.N(N)) dut (
    .clk, .rst, .smp_en, .r, .y, .rho0, .rho1, .gamma, .e_tol, .u, .e_mon, .exp2,
    .x_event, .repeat_event, .upd_valid, .rho0_new, .rho1_new, .dj0_mon, .dj1_mon
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // reference model state
  bit     st;
  int     cnt1, cnt2, uy;
  longint peak, mem [N];
  longint p1u, p1e, p2u, p2e;
  longint g0, g1, d0, d1, gep;
  longint r0, r1, km, am, gm, tol, ym, tc;
  int     n_repeat, n_x, n_upd, n_exp1, n_exp2, n_recip;

  function automatic longint pi_step(inout longint uu, inout longint ep, input longint ev);
    uu = radd(uu, radd(rmul(r0, ev), rmul(rsub(rmul(r1, tc), r0), ep)));
    ep = ev;
    return uu;
  endfunction

  initial begin
    longint rw, ev, refv, xs, nu0, nu1, pk;
    bit x, c, y1, y2, exp_upd, exp_x, exp_rep;
    int ref_cnt;
    tc = rfx(0.1);
    r0 = rfx(1.0); r1 = rfx(6.0); gm = rfx(3.2); tol = rfx(100.0);
    rho0 = fx_t'(r0); rho1 = fx_t'(r1); gamma = fx_t'(gm); e_tol = fx_t'(tol);
    r = word_t'(1024); y = '0;
    st = 0; cnt1 = 0; cnt2 = 0; uy = 1; peak = 0;
    p1u = 0; p1e = 0; p2u = 0; p2e = 0; g0 = 0; g1 = 0; d0 = 0; d1 = 0; gep = 0; ym = 0;
    n_repeat = 0; n_x = 0; n_upd = 0; n_exp1 = 0; n_exp2 = 0; n_recip = 0;
    foreach (mem[i]) mem[i] = 0;
    km = (64'sd1 <<< 40) / (r0 + r1); am = rmul(r0, km);
    ref_cnt = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (SPACING) @(negedge clk);

    for (int s = 0; s < 40 * N; s++) begin
      if (s == 3 * N) begin tol = rfx(0.05); e_tol = fx_t'(tol); end
      // reference square wave, 5 samples per level
      r = ((ref_cnt / 5) % 2 == 0) ? word_t'(1024) : word_t'(0);
      ref_cnt++;
      rw = longint'(r);
      // ---- model of one strobe ----
      x  = (cnt1 == N) && (peak > tol);
      c  = (cnt2 != N);
      y1 = !st && !x;
      y2 = st && c;
      refv = y1 ? rw : (y2 ? mem[cnt2] : 0);
      ev = rsub(refv <<< 10, longint'(y) <<< 10);
      exp_upd = 0; exp_x = 0; exp_rep = 0;
      if (y1) begin
        mem[(cnt1 == N) ? 0 : cnt1] = rword(ev);
        void'(pi_step(p1u, p1e, ev));
        pk = (ev < 0) ? rsub(0, ev) : ev;
        peak = (cnt1 == 0 || cnt1 == N) ? pk : ((pk > peak) ? pk : peak);
        if (cnt1 == N) begin exp_rep = 1; n_repeat++; end
        cnt1 = (cnt1 == N) ? 1 : cnt1 + 1;
        uy = 1; n_exp1++;
      end
      if (y2) begin
        void'(pi_step(p2u, p2e, ev));
        g0 = radd(rmul(am, g0), rmul(km, rsub(ev, gep)));
        g1 = radd(rmul(am, g1), rmul(km, ev));
        d0 = sat_acc(d0 + rmul(ev, g0));
        d1 = sat_acc(d1 + rmul(ev, g1));
        gep = ev;
        cnt2++;
        uy = 2; n_exp2++;
      end
      if (!st && x) begin
        st = 1; cnt2 = 0; p2u = 0; p2e = 0; g0 = 0; g1 = 0; d0 = 0; d1 = 0; gep = 0;
        exp_x = 1; n_x++;
      end else if (st && !c) begin
        st = 0; cnt1 = 0; peak = 0;
        nu0 = rsub(r0, rmul(gm, sat((d0 * ((64'sd1048576 + N / 2) / N)) >>> 20)));
        nu1 = rsub(r1, rmul(gm, sat((d1 * ((64'sd1048576 + N / 2) / N)) >>> 20)));
        exp_upd = 1;
      end
      // ---- DUT strobe ----
      smp_en = 1;
      #1;
      check(x_event == exp_x, $sformatf("s=%0d x_event %0d exp %0d", s, x_event, exp_x));
      check(repeat_event == exp_rep, $sformatf("s=%0d repeat_event", s));
      @(negedge clk); smp_en = 0;
      check(longint'(u) == ((uy == 1) ? p1u : p2u), $sformatf("s=%0d u=%0d exp %0d", s, u, (uy == 1) ? p1u : p2u));
      check(exp2 == st, $sformatf("s=%0d experiment flag", s));
      check(upd_valid == exp_upd, $sformatf("s=%0d upd_valid", s));
      if (exp_upd) begin
        n_upd++;
        check(longint'(rho0_new) == nu0 && longint'(rho1_new) == nu1,
              $sformatf("update %0d: %0d %0d exp %0d %0d", n_upd, rho0_new, rho1_new, nu0, nu1));
        // feed the update back as the parameters in use, within a sane range
        if (nu0 > rfx(0.05) && nu1 > rfx(0.05) && nu0 < rfx(30.0) && nu1 < rfx(100.0)) begin
          r0 = nu0; r1 = nu1;
          rho0 = fx_t'(r0); rho1 = fx_t'(r1);
          km = (64'sd1 <<< 40) / (r0 + r1); am = rmul(r0, km);
          n_recip++;
        end
      end
      // plant: y = 0.904837 y + 0.09516 u, read back through a 12-bit ADC
      ym = radd(rmul(rfx(0.904837), ym), rmul(rfx(0.09516), longint'(u)));
      y = word_t'(rword(ym));
      repeat (SPACING - 1) @(negedge clk);
    end
    $display("events: exp1 samples=%0d exp2 samples=%0d repeats=%0d x=%0d updates=%0d recip restarts=%0d",
             n_exp1, n_exp2, n_repeat, n_x, n_upd, n_recip);
    check(n_repeat > 0, "experiment#1 repeated within tolerance");
    check(n_x > 0, "error check started a gradient experiment");
    check(n_upd > 0, "parameter update");
    check(n_recip > 0, "reciprocal recomputed for new parameters");
    check(n_exp2 >= n_upd * N && n_exp2 <= n_upd * N + N, "exp#2 runs have N samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
