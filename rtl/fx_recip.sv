// fx_recip: sequential reciprocal 1/d in Q11.20, used for the coefficients
// k = 1/(rho0+rho1) of the IFT gradient filter. A restoring divider divides
// 2^40 by |d| one quotient bit per clock (41 cycles), then restores the sign.
// Results beyond the Q11.20 range, and d = 0, saturate. The source does not
// say how the division in the gradient filter was built; a bit-serial divider
// run once per parameter set is this design's choice.
//
// Interface: `start` (one cycle) captures d and clears `valid`; `valid` rises
// when q holds the result and stays high until the next start.
module fx_recip
  import ift_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  d,
  output logic valid,
  output fx_t  q
);
  localparam int unsigned QB = 2 * FX_F + 1;   // quotient bits of 2^40/|d|

  logic              busy;
  logic              neg;
  logic [FX_W-1:0]   dv;          // |d|
  logic [FX_W-1:0]   rem;         // remainder < |d| <= 2^31
  logic [QB-1:0]     quo;
  logic [$clog2(QB+1)-1:0] bitn;  // bits still to produce

  logic [FX_W:0]     rem_sh;
  logic              take;

  always_comb begin
    // dividend 2^40 has a single one, at the first bit produced
    rem_sh = {rem, (bitn == ($clog2(QB+1))'(QB))};
    take   = rem_sh >= {1'b0, dv};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      valid <= 1'b0;
      neg   <= 1'b0;
      dv    <= '0;
      rem   <= '0;
      quo   <= '0;
      bitn  <= '0;
      q     <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      valid <= 1'b0;
      neg   <= d[FX_W-1];
      dv    <= d[FX_W-1] ? FX_W'(-d) : FX_W'(d);
      rem   <= '0;
      quo   <= '0;
      bitn  <= ($clog2(QB+1))'(QB);
    end else if (busy) begin
      if (dv == '0) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        q     <= FX_MAX;
      end else if (bitn != '0) begin
        rem  <= take ? FX_W'(rem_sh - {1'b0, dv}) : FX_W'(rem_sh);
        quo  <= {quo[QB-2:0], take};
        bitn <= bitn - 1'b1;
      end else begin
        busy  <= 1'b0;
        valid <= 1'b1;
        if (quo > QB'(FX_MAX)) q <= neg ? FX_MIN : FX_MAX;
        else                   q <= neg ? -fx_t'(quo) : fx_t'(quo);
      end
    end
  end
endmodule
