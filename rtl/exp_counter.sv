// exp_counter: loop counter of one tuning experiment. The IFT data path has
// one for experiment#1 and one for experiment#2; each counts the samples of
// an N-sample experiment and reports to the control FSM when the iteration
// count has reached N.
//
// `count` is the number of samples taken in the current run, 0..N. `at_n`
// (count == N) is the status signal. A strobe on `en` while count == N
// starts a new run with this sample as its first (count becomes 1), which
// is how experiment#1 repeats when the error stays within tolerance. `clr`
// (wins over en) returns to 0. `idx` is the sample index of the sample
// being taken now (0..N-1), used as the memory address.
// The counting to N follows the source; the exact restart rule is this
// design's choice.
module exp_counter #(
  parameter int unsigned N  = 1000,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          clr,
  output logic [CW-1:0] count,
  output logic [AW-1:0] idx,
  output logic          at_n
);
  assign at_n = (count == CW'(N));
  assign idx  = at_n ? '0 : AW'(count);

  always_ff @(posedge clk) begin
    if (rst || clr)  count <= '0;
    else if (en)     count <= at_n ? CW'(1) : count + 1'b1;
  end
endmodule
