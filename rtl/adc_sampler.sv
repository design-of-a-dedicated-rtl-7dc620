// adc_sampler: the ADC process. In the self-contained FPGA setup the plant
// runs inside the FPGA, so the "analogue" plant output is the model's wide
// internal value. On each ADC strobe this block samples it and converts it
// to the 12-bit Q2.10 word the IFT hardware reads: the 10 extra fraction
// bits are truncated and values beyond the 12-bit range saturate, as a
// 12-bit converter would clip. The sample-and-convert behaviour and the
// separate ADC strobe follow the source; the exact quantiser is this
// design's choice.
//
// Interface: `en` = ADC strobe, `ain` = Q11.20 input, `dout` = registered
// Q2.10 output, valid from the cycle after the strobe. Reset clears dout.
module adc_sampler
  import ift_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  fx_t   ain,
  output word_t dout
);
  always_ff @(posedge clk) begin
    if (rst)     dout <= '0;
    else if (en) dout <= fx_to_word(ain);
  end
endmodule
