// ift_main_process: the PI controller combined with 1-DOF iterative feedback
// tuning, as a control FSM plus data path.
//
// Operation, one step per sample strobe `smp_en`:
//   Experiment#1 (FSM state Q = 0): the loop is closed with PI controller #1
//     on the reference r(t): e1 = r - y, u1 = PI(e1). Each e1 sample is
//     written to the sample memory, and the peak |e1| of the run is kept.
//     After N samples the error check runs: if the peak error is above
//     e_tol (x = 1) the FSM moves to experiment#2, otherwise experiment#1
//     repeats and the controller just keeps regulating.
//   Experiment#2 (Q = 1): the loop is closed with PI controller #2, started
//     from rest, on the stored e1 as reference: e2 = e1 - y, u2 = PI(e2).
//     e2 feeds the gradient filters and the dJ/drho sums.
//   After N samples of experiment#2 the FSM returns to experiment#1 and the
//     parameter update rho <- rho - gamma*dJ/N is computed and offered on
//     rho0_new/rho1_new with a one-cycle `upd_valid`.
// The parameters in use (rho0/rho1) come from outside, from the latch that
// the operator's tuning button controls. Whenever they change, a bit-serial
// divider recomputes k = 1/(rho0+rho1) (41 clock cycles); a = rho0*k.
//
// What follows the source: the two experiments, the stored experiment#1
// error as experiment#2 reference, the PI law, the gradient filter, the
// gradient sums, the update law, the two loop counters, the eight
// experiment buffers and the two-state FSM with its x/c conditions and
// equations. This design's choices: the fixed-point formats, the peak-error
// form of the error check, restarting controller #2 and the filters from
// rest for each gradient experiment, the divider, and handing the update to
// an external latch.
//
// Timing: the FSM, counters, PI controllers and gradient state all advance
// on the clock edge where smp_en is high; `u` (the plant drive) changes
// right after that edge and holds between strobes. The tick that moves from
// one experiment to the other processes no sample (no buffer is driven; u
// holds). Strobes must be at least 48 clock cycles apart so the divider
// finishes before a gradient sample needs k (checked by an assertion).
module ift_main_process
  import ift_pkg::*;
#(
  parameter int unsigned N      = 1000,
  parameter fx_t         T_CTRL = fx_from_real(0.1)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  smp_en,
  input  word_t r,
  input  word_t y,
  input  fx_t   rho0,
  input  fx_t   rho1,
  input  fx_t   gamma,
  input  fx_t   e_tol,
  output fx_t   u,
  output fx_t   e_mon,
  output logic  exp2,
  output logic  x_event,
  output logic  repeat_event,
  output logic  upd_valid,
  output fx_t   rho0_new,
  output fx_t   rho1_new,
  output fx_t   dj0_mon,
  output fx_t   dj1_mon
);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;

  // ---------------- control unit and loop counters ----------------
  logic          ya, yb, y1, y2, x, c;
  logic [CW-1:0] cnt1;
  logic [AW-1:0] idx1, idx2;
  logic          at_n1, at_n2;
  fx_t           peak;

  ift_fsm u_fsm (
    .clk, .rst, .en(smp_en), .x, .c, .ya, .yb, .y1, .y2
  );

  assign x = at_n1 && (peak > e_tol);
  assign c = !at_n2;

  logic to_exp2, to_exp1;   // transition ticks
  assign to_exp2 = smp_en && ya && x;
  assign to_exp1 = smp_en && yb && !c;

  exp_counter #(.N(N)) u_cnt1 (
    .clk, .rst, .en(smp_en && y1), .clr(to_exp1), .count(cnt1), .idx(idx1), .at_n(at_n1)
  );
  exp_counter #(.N(N)) u_cnt2 (
    .clk, .rst, .en(smp_en && y2), .clr(to_exp2), .count(), .idx(idx2), .at_n(at_n2)
  );

  // ---------------- data path ----------------
  word_t ref_net, mem_rdata, mem_wdata;
  logic  mem_we, grad_en, pi1_en, pi2_en;
  fx_t   e, grad_e, pi1_e, pi2_e, u1, u2, u_net;
  logic  uy1, uy2;   // enables of buffers B7/B8, see below

  // comparator: e = reference - plant output
  assign e = fx_sub(word_to_fx(ref_net), word_to_fx(y));

  exp_switch u_sw (
    .y1, .y2, .uy1, .uy2, .r, .mem_rdata, .e, .u1, .u2,
    .ref_net, .mem_we, .mem_wdata, .grad_en, .grad_e,
    .pi1_en, .pi1_e, .pi2_en, .pi2_e, .u_net
  );

  exp_memory #(.DEPTH(N), .W(WORD_W)) u_mem (
    .clk, .we(smp_en && mem_we), .waddr(idx1), .wdata(mem_wdata),
    .raddr(idx2), .rdata(mem_rdata)
  );

  pi_controller #(.T_CTRL(T_CTRL)) u_pi1 (
    .clk, .rst, .en(smp_en && pi1_en), .clr(1'b0), .e(pi1_e), .rho0, .rho1, .u(u1)
  );
  pi_controller #(.T_CTRL(T_CTRL)) u_pi2 (
    .clk, .rst, .en(smp_en && pi2_en), .clr(to_exp2), .e(pi2_e), .rho0, .rho1, .u(u2)
  );

  // Buffers B7/B8 put the controller of the sample just taken on the plant
  // drive net. The PI outputs are registered at the strobe edge, so their
  // enables are the y1/y2 of that sample, held until the next sample.
  always_ff @(posedge clk) begin
    if (rst) begin
      uy1 <= 1'b1;
      uy2 <= 1'b0;
    end else if (smp_en && (y1 || y2)) begin
      uy1 <= y1;
      uy2 <= y2;
    end
  end
  assign u = u_net;

  // peak |e1| of the current experiment#1 run
  fx_t abs_e;
  assign abs_e = e[FX_W-1] ? fx_sub('0, e) : e;
  always_ff @(posedge clk) begin
    if (rst || to_exp1) peak <= '0;
    else if (smp_en && y1) peak <= (cnt1 == '0 || at_n1) ? abs_e : ((abs_e > peak) ? abs_e : peak);
  end

  // error monitor: last processed error
  always_ff @(posedge clk) begin
    if (rst)                    e_mon <= '0;
    else if (smp_en && (y1 || y2)) e_mon <= e;
  end

  // ---------------- coefficients k = 1/(rho0+rho1), a = rho0*k ----------------
  fx_t  rho0_q, rho1_q, k, a;
  logic k_valid, recip_start;
  always_ff @(posedge clk) begin
    if (rst) begin
      rho0_q      <= '0;
      rho1_q      <= '0;
      recip_start <= 1'b1;
    end else begin
      rho0_q      <= rho0;
      rho1_q      <= rho1;
      recip_start <= (rho0 != rho0_q) || (rho1 != rho1_q);
    end
  end

  fx_recip u_recip (
    .clk, .rst, .start(recip_start), .d(fx_add(rho0_q, rho1_q)), .valid(k_valid), .q(k)
  );
  assign a = fx_mul(rho0_q, k);

  // ---------------- gradient experiment and update ----------------
  acc_t dj0, dj1;

  ift_gradient u_grad (
    .clk, .rst, .en(smp_en && grad_en), .clr(to_exp2), .e2(grad_e), .k, .a,
    .g0(), .g1(), .dj0, .dj1
  );

  param_update #(.N(N)) u_upd (
    .clk, .rst, .start(to_exp1), .rho0, .rho1, .gamma, .dj0, .dj1,
    .valid(upd_valid), .rho0_new, .rho1_new
  );

  assign exp2         = yb;
  assign x_event      = to_exp2;
  assign repeat_event = smp_en && ya && at_n1 && !x;
  assign dj0_mon      = fx_sat64(64'(dj0));
  assign dj1_mon      = fx_sat64(64'(dj1));

  // a gradient sample needs the coefficients of the parameters in use
  always_ff @(posedge clk) begin
    if (!rst && smp_en && grad_en)
      assert (k_valid && !recip_start) else $error("ift_main_process: gradient sample before 1/(rho0+rho1) is ready");
  end
endmodule
