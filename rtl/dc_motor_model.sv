// dc_motor_model: the plant G(z) used to test the controller. It is the
// step-invariant (zero-order-hold) discretisation of the DC motor
// 1.01/(2s+1) at a 200 ms sampling time, which gives the difference equation
//     y(t) = 0.904837 * y(t-1) + 0.09516 * u(t).
// The coefficients follow the source; the source also embedded this model in
// the FPGA next to the controller. Arithmetic is Q11.20 with saturation.
//
// Interface: on each clock edge with `en` high the model takes u(t) and
// updates y; `y` is the registered state, available the cycle after. Reset
// puts the motor at rest (y = 0).
module dc_motor_model
  import ift_pkg::*;
#(
  parameter fx_t A_COEF = fx_from_real(0.904837),
  parameter fx_t B_COEF = fx_from_real(0.09516)
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fx_t  u,
  output fx_t  y
);
  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= fx_add(fx_mul(A_COEF, y), fx_mul(B_COEF, u));
  end
endmodule
