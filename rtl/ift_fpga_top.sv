// ift_fpga_top: the dedicated IFT microcontroller as a self-contained FPGA
// design: a PI controller whose two parameters are tuned on line by 1-DOF
// iterative feedback tuning, together with a digital model of the DC motor
// it controls and six PWM DAC channels for watching the loop on a scope.
//
// Blocks and connections:
//   clk_div (main)   -> sample strobe for the reference, the IFT main process
//                       and (one cycle later) the plant model
//   clk_div (ADC)    -> strobe for the ADC process
//   ref_gen          -> r(t), square wave 0 / 1.0 V, one step every N samples,
//                       restarted on a step up when a tuning cycle begins
//   ift_main_process -> experiments #1/#2, gradient, update proposal, drives u
//   param_latch      -> parameters in use; takes an update per button press
//   dc_motor_model   -> y(t) = 0.904837 y(t-1) + 0.09516 u(t)
//   adc_sampler      -> 12-bit sample of y for the controller
//   pwm_dac x6       -> r, y, e, u, rho0, rho1 as PWM (Q2.10, offset binary)
// The block list, the embedded plant, the six monitored signals and the
// 12-bit PWM DACs follow the source. The divide ratios are this design's
// choice (the source does not give them): with a 50 MHz clock, SMP_DIV =
// 10000 gives a 5 kHz sample rate and ADC_DIV = 1000 samples y at 50 kHz.
// REF_AMP sets the reference amplitude (Q2.10) and SINGLE_STEP selects a
// single step instead of the square wave; both are build-time options for
// the reference-amplitude and single-step runs the source describes.
//
// Ports: rho0_init/rho1_init are loaded at reset; gamma and e_tol are the
// tuning step size and the tolerated error (all Q11.20). `mon` holds the
// 12-bit words behind the PWM channels in the order r, y, e, u, rho0, rho1
// (index 0..5), `pwm` the matching PWM outputs. `status` brings out the
// experiment state and one-cycle event strobes; dj_mon the two gradient sums
// dJ/drho0, dJ/drho1 of the running or last gradient experiment.
module ift_fpga_top
  import ift_pkg::*;
#(
  parameter int unsigned N       = 1000,
  parameter int unsigned SMP_DIV = 10000,
  parameter int unsigned ADC_DIV = 1000,
  parameter word_t       REF_AMP = word_t'(1024),   // reference step, 1.0 V
  parameter bit          SINGLE_STEP = 1'b0          // 1: one step, no square wave
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tune_btn,
  input  fx_t         rho0_init,
  input  fx_t         rho1_init,
  input  fx_t         gamma,
  input  fx_t         e_tol,
  output logic [5:0]  pwm,
  output word_t       mon [6],
  output fx_t         dj_mon [2],
  output ift_status_t status
);
  logic smp_tick, adc_tick, plant_en;

  clk_div #(.DIV(SMP_DIV)) u_div_main (.clk, .rst, .tick(smp_tick), .clk_out());
  clk_div #(.DIV(ADC_DIV)) u_div_adc  (.clk, .rst, .tick(adc_tick), .clk_out());

  word_t r, y_adc;
  fx_t   u, e, y_plant, rho0, rho1, rho0_new, rho1_new, dj0, dj1;
  logic  exp2, x_event, repeat_event, upd_valid, armed, loaded;

  // every tuning cycle starts on a fresh step up: the update strobe (one clock
  // after the switch back to experiment#1) restarts the reference
  ref_gen #(.HALF(N), .AMP(REF_AMP), .SINGLE(SINGLE_STEP)) u_ref (.clk, .rst, .en(smp_tick), .restart(upd_valid), .r);

  ift_main_process #(.N(N)) u_main (
    .clk, .rst, .smp_en(smp_tick), .r, .y(y_adc), .rho0, .rho1, .gamma, .e_tol,
    .u, .e_mon(e), .exp2, .x_event, .repeat_event, .upd_valid, .rho0_new, .rho1_new,
    .dj0_mon(dj0), .dj1_mon(dj1)
  );

  param_latch u_latch (
    .clk, .rst, .btn(tune_btn), .init0(rho0_init), .init1(rho1_init),
    .upd_valid, .new0(rho0_new), .new1(rho1_new), .rho0, .rho1, .armed, .loaded
  );

  // the plant takes u(t) one cycle after the controller computed it
  always_ff @(posedge clk) begin
    if (rst) plant_en <= 1'b0;
    else     plant_en <= smp_tick;
  end

  dc_motor_model u_plant (.clk, .rst, .en(plant_en), .u, .y(y_plant));

  adc_sampler u_adc (.clk, .rst, .en(adc_tick), .ain(y_plant), .dout(y_adc));

  assign mon[0] = r;
  assign mon[1] = y_adc;
  assign mon[2] = fx_to_word(e);
  assign mon[3] = fx_to_word(u);
  assign mon[4] = fx_to_word(rho0);
  assign mon[5] = fx_to_word(rho1);

  for (genvar i = 0; i < 6; i++) begin : g_dac
    pwm_dac #(.N_BITS(WORD_W)) u_dac (.clk, .rst, .code(mon[i]), .pwm(pwm[i]));
  end

  assign dj_mon[0] = dj0;
  assign dj_mon[1] = dj1;

  assign status = '{exp2: exp2, x_event: x_event, repeat1: repeat_event,
                    upd_event: upd_valid, latched: loaded, armed: armed};
endmodule
