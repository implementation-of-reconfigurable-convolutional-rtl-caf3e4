// min_state_finder - picks the trellis state with the smallest path metric.
//
// Scans the 2^(k-1) states that exist at constraint length k and returns
// the index and metric of the smallest; the lowest index wins a tie.
// Purely combinational (a compare chain); the decoder spends one clock on
// it after the last trellis step of a frame that is not terminated.
module min_state_finder
  import cc_pkg::*;
#(
  parameter int unsigned MW = 8
) (
  input  logic [MW-1:0] pm [NSMAX],
  input  logic [3:0]    k,
  output logic [SW-1:0] best_state,
  output logic [MW-1:0] best_metric
);

  always_comb begin
    best_state  = '0;
    best_metric = pm[0];
    for (int s = 1; s < NSMAX; s++) begin
      if ((SW'(s) & ~state_mask(k)) == '0 && pm[s] < best_metric) begin
        best_state  = SW'(s);
        best_metric = pm[s];
      end
    end
  end

endmodule
