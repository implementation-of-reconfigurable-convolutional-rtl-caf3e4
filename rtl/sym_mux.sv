// sym_mux - the 2:1 multiplexer that puts the encoder's two output bits on
// one serial line.
//
// A symbol offered with sym_valid is captured and sent as two consecutive
// bits, v1 (sym[1]) first, then v2 (sym[0]), with ser_valid high for both.
// The select line is a phase bit toggled every clock while a symbol is in
// flight. sof_in marks the first symbol of a frame; ser_sof is then high
// with its first bit so the receiver can pair the bits again. A new symbol
// may be offered at most every second clock (the encoder runs at half the
// bit rate); ready is high when one can be accepted.
module sym_mux (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] sym,
  input  logic       sym_valid,
  input  logic       sof_in,
  output logic       ready,
  output logic       ser_bit,
  output logic       ser_valid,
  output logic       ser_sof
);

  logic [1:0] hold;
  logic       busy;    // a symbol is being sent
  logic       sel;     // 0: v1, 1: v2
  logic       sof_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold  <= '0;
      busy  <= 1'b0;
      sel   <= 1'b0;
      sof_q <= 1'b0;
    end else if (sym_valid && ready) begin
      hold  <= sym;
      busy  <= 1'b1;
      sel   <= 1'b0;
      sof_q <= sof_in;
    end else if (busy) begin
      sel   <= ~sel;
      busy  <= ~sel;       // done after the second bit
      sof_q <= 1'b0;
    end
  end

  assign ready     = !busy || sel;
  assign ser_valid = busy;
  assign ser_bit   = sel ? hold[0] : hold[1];
  assign ser_sof   = busy && !sel && sof_q;

endmodule
