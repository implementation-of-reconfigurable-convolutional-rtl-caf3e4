// branch_metric - hard-decision branch metric unit.
//
// For a received 2-bit symbol rx it gives, for each of the four symbols a
// branch can carry (index e = {v1,v2}), the Hamming distance between rx and
// e: the bitwise XOR of the two, with its ones counted. Purely
// combinational; all trellis branches of a step share these four values.
module branch_metric (
  input  logic [1:0] rx,
  output logic [1:0] bm [4]
);

  always_comb begin
    for (int e = 0; e < 4; e++) begin
      logic [1:0] d;
      d     = rx ^ 2'(e);
      bm[e] = 2'(d[1]) + 2'(d[0]);
    end
  end

endmodule
