// survivor_memory - decision store of the Viterbi decoder.
//
// One row of NS decision bits per trellis step, DEPTH rows: the whole
// frame is kept so the traceback can start after the last symbol. A row is
// written on we at waddr; the read port returns, combinationally, the
// decision bit of state rstate in row raddr. The array has no reset: every
// row a frame reads is written by that frame first.
module survivor_memory #(
  parameter int unsigned DEPTH = 15,
  parameter int unsigned NS    = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [NS-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  input  logic [$clog2(NS)-1:0]    rstate,
  output logic                     rbit
);

  logic [NS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rbit = mem[raddr][rstate];

endmodule
