// ref_gen: reference signal process. Produces the set-point r(t) for the
// control loop as a square wave between 0 and AMP (Q2.10), stepping every
// HALF sample strobes. `restart` puts the wave back to the start of its
// high half, so that a tuning cycle can begin on a fresh step up. The source
// uses step changes of the reference synchronised with the tuning cycle and
// a 1 V step amplitude; the step length (HALF), the low level of 0 V and the
// restart input are this design's choices.
//
// Interface: `en` is the sample strobe; r changes on the clock edge at which
// en is high. `restart` (one clock, between strobes) sets r = AMP at once and
// starts a new high half of HALF strobes; it wins over en. After reset
// r = AMP (the loop starts with a step up).
//
// With SINGLE = 1 the generator gives a single step instead: r = AMP from
// reset on, for good; strobes and restarts leave it there.
module ref_gen
  import ift_pkg::*;
#(
  parameter int unsigned HALF = 1000,
  parameter word_t       AMP  = word_t'(1024),  // 1.0 V in Q2.10
  parameter bit          SINGLE = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  restart,
  output word_t r
);
  localparam int unsigned CW = (HALF > 1) ? $clog2(HALF) : 1;
  logic [CW-1:0] cnt;
  logic          high;

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      cnt  <= '0;
      high <= 1'b1;
    end else if (en && !SINGLE) begin
      if (cnt == CW'(HALF - 1)) begin
        cnt  <= '0;
        high <= ~high;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign r = high ? AMP : '0;
endmodule
