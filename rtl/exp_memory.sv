// exp_memory: sample memory between the two experiments. During
// experiment#1 the FSM's "run Exp#1 / write memory" command stores one
// 12-bit error sample e1(t) per sample period; during experiment#2 ("run
// Exp#2 / read memory") the samples are read back in order and serve as the
// reference of the gradient experiment. DEPTH = N words.
//
// A plain simple-dual-port array: synchronous write, registered read (one
// cycle latency), no reset of the contents (a location is always written in
// experiment#1 before experiment#2 reads it). Maps to FPGA block RAM.
module exp_memory #(
  parameter int unsigned DEPTH = 1000,
  parameter int unsigned W     = 12,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
