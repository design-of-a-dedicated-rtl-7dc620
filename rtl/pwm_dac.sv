// pwm_dac: one channel of the pulse-width-modulated DAC used to bring
// internal signals out of the FPGA. A free-running N_BITS counter is compared
// with the duty code; the output is high while counter < duty, so the duty
// cycle is duty/2^N_BITS and the PWM frequency is f_clk/2^N_BITS
// (50 MHz/4096 = 12.2 kHz for 12 bits). An external RC low-pass filter
// averages the output into a voltage. The 12-bit resolution and the
// counter/compare principle follow the source.
//
// The input is a signed Q2.10 word; it is offset by half scale (code + 2048)
// so that -2.0 maps to 0 % and just under +2.0 to 4095/4096 duty; this
// offset is this design's choice. A new code is taken only when the counter
// wraps, so every period has a single, glitch-free pulse.
module pwm_dac #(
  parameter int unsigned N_BITS = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [N_BITS-1:0] code,
  output logic                     pwm
);
  logic [N_BITS-1:0] cnt;
  logic [N_BITS-1:0] duty;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      duty <= '0;
      pwm  <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty <= {~code[N_BITS-1], code[N_BITS-2:0]};
      pwm <= (cnt + 1'b1) < ((cnt == '1) ? {~code[N_BITS-1], code[N_BITS-2:0]} : duty);
    end
  end
endmodule
