// pi_controller: discrete PI controller with zero-order hold, the control law
// of the loop under tuning. It is the ZOH transform of rho0 + rho1/s with
// controller period T:
//     u(t) = u(t-1) + rho0*e(t) + (rho1*T - rho0)*e(t-1)
// This difference equation and T = 0.1 s follow the source. The IFT
// microcontroller holds two of these: one closes the loop in experiment#1,
// the other (with its own state) in experiment#2.
//
// Arithmetic is Q11.20 with saturation at every step (this design's choice;
// it also bounds integrator wind-up to the number range).
// Interface: on a clock edge with `en` high the controller takes e(t) and the
// current rho0/rho1, and `u` holds u(t) from the next cycle on. `clr` (wins
// over en) zeroes u(t-1) and e(t-1), i.e. starts from rest.
module pi_controller
  import ift_pkg::*;
#(
  parameter fx_t T_CTRL = fx_from_real(0.1)
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clr,
  input  fx_t  e,
  input  fx_t  rho0,
  input  fx_t  rho1,
  output fx_t  u
);
  fx_t e_prev;
  fx_t coef1;     // rho1*T - rho0
  fx_t u_next;

  always_comb begin
    coef1  = fx_sub(fx_mul(rho1, T_CTRL), rho0);
    u_next = fx_add(u, fx_add(fx_mul(rho0, e), fx_mul(coef1, e_prev)));
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      u      <= '0;
      e_prev <= '0;
    end else if (en) begin
      u      <= u_next;
      e_prev <= e;
    end
  end
endmodule
