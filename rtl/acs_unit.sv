// acs_unit - add-compare-select element for one trellis state.
//
// Each of the two predecessor path metrics is increased by the branch
// metric of its branch into this state; the smaller sum becomes the new
// path metric and dec tells which predecessor survived (1 = predecessor 1).
// On a tie predecessor 0 is kept. Combinational; the caller registers.
// Metrics are unsigned and not normalised; the caller bounds the frame so
// that no sum overflows MW bits.
module acs_unit #(
  parameter int unsigned MW = 8
) (
  input  logic [MW-1:0] pm0,
  input  logic [MW-1:0] pm1,
  input  logic [1:0]    bm0,
  input  logic [1:0]    bm1,
  output logic [MW-1:0] pm_out,
  output logic          dec
);

  logic [MW-1:0] c0, c1;

  always_comb begin
    c0     = pm0 + MW'(bm0);
    c1     = pm1 + MW'(bm1);
    dec    = (c1 < c0);
    pm_out = dec ? c1 : c0;
  end

endmodule
