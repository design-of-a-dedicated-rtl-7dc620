// param_update: parameter update of the tuning step. With the cost gradient
// taken as the mean of the accumulated products, (1/N)*sum e2*de2/drho, the
// new parameters are
//     rho0' = rho0 - gamma * dJ0/N
//     rho1' = rho1 - gamma * dJ1/N
// The update law and the 1/N normalisation follow the source; the source
// takes gamma from outside (chosen by hand per operating point), so gamma is
// an input. 1/N is a constant rounded to Q11.20; all arithmetic saturates.
//
// Interface: a one-cycle `start` captures the inputs; one cycle later
// `valid` pulses with rho0_new/rho1_new, which then hold until the next start.
module param_update
  import ift_pkg::*;
#(
  parameter int unsigned N = 1000
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  rho0,
  input  fx_t  rho1,
  input  fx_t  gamma,
  input  acc_t dj0,
  input  acc_t dj1,
  output logic valid,
  output fx_t  rho0_new,
  output fx_t  rho1_new
);
  localparam fx_t INV_N = fx_t'(((longint'(1) << FX_F) + longint'(N) / 2) / longint'(N));

  // dJ/N in Q11.20: acc_t * Q11.20 -> >>> FX_F, saturated.
  function automatic fx_t mean_of(input acc_t s);
    logic signed [ACC_W+FX_W-1:0] p;
    logic signed [ACC_W+FX_W-1:0] q;
    p = (ACC_W+FX_W)'(s) * (ACC_W+FX_W)'(INV_N);
    q = p >>> FX_F;
    if (q > (ACC_W+FX_W)'(FX_MAX)) return FX_MAX;
    if (q < (ACC_W+FX_W)'(FX_MIN)) return FX_MIN;
    return fx_t'(q);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      valid    <= 1'b0;
      rho0_new <= '0;
      rho1_new <= '0;
    end else begin
      valid <= start;
      if (start) begin
        rho0_new <= fx_sub(rho0, fx_mul(gamma, mean_of(dj0)));
        rho1_new <= fx_sub(rho1, fx_mul(gamma, mean_of(dj1)));
      end
    end
  end

  initial assert (N >= 1) else $error("param_update: N must be at least 1");
endmodule
