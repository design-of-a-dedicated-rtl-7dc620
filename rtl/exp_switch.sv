// exp_switch: the bank of eight experiment buffers of the IFT data path.
// In the original architecture eight tri-state buffers, each enabled by the
// experiment#1 or experiment#2 control line, decide which signals flow in
// which experiment. Inside an FPGA the tri-state nets become multiplexers;
// an undriven net reads as 0 here. The source gives the count of buffers
// and their enable lines but does not list their individual wiring, so the
// assignment below is this design's reading of the data path:
//   B1 (y1): reference r(t)            -> reference net
//   B2 (y1): error e1(t) word          -> memory write port (and write enable)
//   B3 (y2): memory read data e1(t)    -> reference net
//   B4 (y2): error e2(t)               -> gradient filter
//   B5 (y1): error                     -> PI controller of experiment#1
//   B6 (y2): error                     -> PI controller of experiment#2
//   B7 (y1): u1(t)                     -> plant drive net
//   B8 (y2): u2(t)                     -> plant drive net
// B7/B8 take their own enables uy1/uy2: the y1/y2 of the last sample taken,
// held until the next one, because the controller outputs are registered
// and the drive must hold between samples.
// The enable outputs (mem_we, grad_en, pi1_en, pi2_en) are the buffer
// enables themselves, y1 or y2, handed on to the block behind each buffer.
// Purely combinational. The FSM guarantees y1 and y2 are never both high;
// an assertion checks it.
module exp_switch
  import ift_pkg::*;
(
  input  logic  y1,
  input  logic  y2,
  input  logic  uy1,
  input  logic  uy2,
  input  word_t r,
  input  word_t mem_rdata,
  input  fx_t   e,
  input  fx_t   u1,
  input  fx_t   u2,
  output word_t ref_net,
  output logic  mem_we,
  output word_t mem_wdata,
  output logic  grad_en,
  output fx_t   grad_e,
  output logic  pi1_en,
  output fx_t   pi1_e,
  output logic  pi2_en,
  output fx_t   pi2_e,
  output fx_t   u_net
);
  always_comb begin
    ref_net   = y1 ? r : (y2 ? mem_rdata : '0);   // B1, B3
    mem_we    = y1;                               // B2
    mem_wdata = y1 ? fx_to_word(e) : '0;
    grad_en   = y2;                               // B4
    grad_e    = y2 ? e : '0;
    pi1_en    = y1;                               // B5
    pi1_e     = y1 ? e : '0;
    pi2_en    = y2;                               // B6
    pi2_e     = y2 ? e : '0;
    u_net     = uy1 ? u1 : (uy2 ? u2 : '0);       // B7, B8
  end

  always_comb begin
    assert (!(y1 && y2) && !(uy1 && uy2)) else $error("exp_switch: both experiments enabled");
  end
endmodule
