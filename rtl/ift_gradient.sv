// ift_gradient: the gradient part of the gradient experiment (experiment#2)
// of 1-DOF iterative feedback tuning. The error e2 of experiment#2 is passed
// through the filter (1/C)(dC/drho) of the PI controller C = ((rho0+rho1)z -
// rho0)/(z-1), whose two rows are
//     de2/drho0 : (z-1)/((rho0+rho1)z - rho0)
//     de2/drho1 :   z  /((rho0+rho1)z - rho0)
// giving, with k = 1/(rho0+rho1) and a = rho0/(rho0+rho1),
//     g0(t) = a*g0(t-1) + k*(e2(t) - e2(t-1))
//     g1(t) = a*g1(t-1) + k*e2(t)
// and the running sums of the cost gradient
//     dJ0(t) = dJ0(t-1) + e2(t)*g0(t)
//     dJ1(t) = dJ1(t-1) + e2(t)*g1(t).
// The filter and the sums follow the source. (The source's printed
// recursion for g1 reuses g0(t-1); the recursion above is the one that the
// filter transfer function gives, and is used here.)
//
// k and a are inputs, computed once per parameter set outside this block, so
// no divider sits in the per-sample path. Filter states are Q11.20, the sums
// Q23.20 (acc_t), all saturating.
// Interface: `clr` (wins over en) zeroes all state at the start of
// experiment#2; each clock edge with `en` high consumes one e2 sample; g0,
// g1, dj0, dj1 are registered and valid the cycle after.
module ift_gradient
  import ift_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clr,
  input  fx_t  e2,
  input  fx_t  k,
  input  fx_t  a,
  output fx_t  g0,
  output fx_t  g1,
  output acc_t dj0,
  output acc_t dj1
);
  localparam acc_t ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam acc_t ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  function automatic acc_t acc_add(input acc_t s, input fx_t v);
    logic signed [ACC_W:0] t;
    t = (ACC_W+1)'(s) + (ACC_W+1)'(v);
    if (t > (ACC_W+1)'(ACC_MAX)) return ACC_MAX;
    if (t < (ACC_W+1)'(ACC_MIN)) return ACC_MIN;
    return acc_t'(t);
  endfunction

  fx_t e_prev;
  fx_t g0_n, g1_n;

  always_comb begin
    g0_n = fx_add(fx_mul(a, g0), fx_mul(k, fx_sub(e2, e_prev)));
    g1_n = fx_add(fx_mul(a, g1), fx_mul(k, e2));
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      e_prev <= '0;
      g0     <= '0;
      g1     <= '0;
      dj0    <= '0;
      dj1    <= '0;
    end else if (en) begin
      e_prev <= e2;
      g0     <= g0_n;
      g1     <= g1_n;
      dj0    <= acc_add(dj0, fx_mul(e2, g0_n));
      dj1    <= acc_add(dj1, fx_mul(e2, g1_n));
    end
  end
endmodule
