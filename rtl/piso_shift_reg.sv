// piso_shift_reg - parallel-in serial-out shift register between the DIP
// switches and the encoder.
//
// load copies din into the register; each shift moves it one place towards
// the MSB. sout is always the MSB, so the word is sent MSB first, the order
// in which the original design's worked example lists its input bits. load wins
// over shift. Reset is synchronous and clears the register.
module piso_shift_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] din,
  input  logic         shift,
  output logic         sout
);

  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)        sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {sr[W-2:0], 1'b0};
  end

  assign sout = sr[W-1];

endmodule
