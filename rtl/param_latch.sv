// param_latch: the parameter latch between the tuner and the PI controllers.
// The operator tunes by pressing a button; each press lets exactly one
// parameter update from the IFT through to the controllers. Without a press
// the controllers keep their parameters while the IFT keeps computing.
// At reset the latch loads the initial pair init0/init1.
//
// The button is synchronised with two flip-flops and edge-detected; a rising
// edge sets `armed`. While armed, an `upd_valid` strobe loads new0/new1 into
// rho0/rho1, pulses `loaded` and clears `armed`. The button-to-latch link
// follows the source; the one-update-per-press rule and the synchroniser are
// this design's choices.
module param_latch
  import ift_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic btn,
  input  fx_t  init0,
  input  fx_t  init1,
  input  logic upd_valid,
  input  fx_t  new0,
  input  fx_t  new1,
  output fx_t  rho0,
  output fx_t  rho1,
  output logic armed,
  output logic loaded
);
  logic [2:0] sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= '0;
      armed  <= 1'b0;
      loaded <= 1'b0;
      rho0   <= init0;
      rho1   <= init1;
    end else begin
      sync   <= {sync[1:0], btn};
      loaded <= 1'b0;
      if (armed && upd_valid) begin
        rho0   <= new0;
        rho1   <= new1;
        armed  <= 1'b0;
        loaded <= 1'b1;
      end else if (sync[1] && !sync[2]) begin
        armed <= 1'b1;
      end
    end
  end
endmodule
