// clk_div: clock division process. The original design has two of these
// (Table "VHDL code structure"): one that paces the PI/IFT main process and
// the reference generator, and one that paces the ADC process. Here both are
// instances of this module.
//
// A counter runs from 0 to DIV-1 on the board clock. When it wraps, `tick`
// is high for exactly one clock cycle and `clk_out` toggles, so clk_out is a
// square wave of period 2*DIV board cycles. Downstream logic uses `tick` as a
// clock enable and stays in the single board-clock domain. The divide ratios
// themselves are not given in the source and are this design's choice.
//
// Timing: the first tick comes DIV cycles after reset is released.
module clk_div #(
  parameter int unsigned DIV = 10000
) (
  input  logic clk,
  input  logic rst,
  output logic tick,
  output logic clk_out
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      tick    <= 1'b0;
      clk_out <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt     <= '0;
      tick    <= 1'b1;
      clk_out <= ~clk_out;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("clk_div: DIV must be at least 2");
endmodule
