// sym_demux - receiver half of the serial link: pairs the bits of the
// multiplexed line back into 2-bit code symbols.
//
// The first valid bit after ser_sof (or the one carrying it) is v1, the
// next is v2; sym_valid pulses for one clock after each second bit, with
// sym = {v1, v2}. sym_sof marks the first symbol of the frame. ser_sof
// realigns the pairing, so a lost bit costs at most the rest of a frame.
module sym_demux (
  input  logic       clk,
  input  logic       rst,
  input  logic       ser_bit,
  input  logic       ser_valid,
  input  logic       ser_sof,
  output logic [1:0] sym,
  output logic       sym_valid,
  output logic       sym_sof
);

  logic have_first;
  logic first_bit;
  logic first_sof;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_first <= 1'b0;
      first_bit  <= 1'b0;
      first_sof  <= 1'b0;
      sym        <= '0;
      sym_valid  <= 1'b0;
      sym_sof    <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      sym_sof   <= 1'b0;
      if (ser_valid) begin
        if (ser_sof || !have_first) begin
          have_first <= 1'b1;
          first_bit  <= ser_bit;
          first_sof  <= ser_sof;
        end else begin
          have_first <= 1'b0;
          sym        <= {first_bit, ser_bit};
          sym_valid  <= 1'b1;
          sym_sof    <= first_sof;
        end
      end
    end
  end

endmodule
