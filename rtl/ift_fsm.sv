// ift_fsm: control unit that sequences the two IFT experiments. One state
// bit Q: Q = 0 is experiment#1 (normal closed-loop run, error samples are
// written to memory), Q = 1 is experiment#2 (gradient experiment, memory is
// read). Inputs:
//   x = 1 when the experiment#1 count has reached N and the error has gone
//       above the tolerated error,
//   c = 1 while the experiment#2 count is not yet N.
// Next state and outputs, as in the source's state diagram:
//   Q+ = ~Q & x | Q & c
//   ya = ~Q, yb = Q                 (Moore: which experiment)
//   y1 = ~Q & ~x, y2 = Q & c        (Mealy: enable the experiment's buffers)
// so experiment#1 repeats while x = 0, and experiment#2 runs while c = 1.
// The tick on which a transition is taken drives neither y1 nor y2.
// The state updates on clock edges with `en` high (the sample strobe).
// Reset enters experiment#1.
module ift_fsm (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic x,
  input  logic c,
  output logic ya,
  output logic yb,
  output logic y1,
  output logic y2
);
  typedef enum logic {EXP1 = 1'b0, EXP2 = 1'b1} state_t;
  state_t q, q_next;

  always_comb begin
    unique case (q)
      EXP1:    q_next = x ? EXP2 : EXP1;
      default: q_next = c ? EXP2 : EXP1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     q <= EXP1;
    else if (en) q <= q_next;
  end

  assign ya = (q == EXP1);
  assign yb = (q == EXP2);
  assign y1 = (q == EXP1) && !x;
  assign y2 = (q == EXP2) && c;
endmodule
