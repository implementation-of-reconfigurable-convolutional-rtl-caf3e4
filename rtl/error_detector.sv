// error_detector - error detection for each decoded frame.
//
// The path metric of the surviving path is the Hamming distance between the
// received frame and the code sequence the decoder chose, i.e. the number
// of channel bit errors it had to correct. On capture the metric is latched
// as err_count and err_flag is raised if it is not zero. With a terminated
// frame whose final state 0 is forced, a large count also exposes frames
// the decoder could not bring back onto a valid path.
module error_detector #(
  parameter int unsigned MW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          capture,
  input  logic [MW-1:0] metric,
  output logic [7:0]    err_count,
  output logic          err_flag
);

  initial assert (MW <= 8) else $error("err_count holds 8 bits");

  always_ff @(posedge clk) begin
    if (rst) begin
      err_count <= '0;
      err_flag  <= 1'b0;
    end else if (capture) begin
      err_count <= 8'(metric);
      err_flag  <= (metric != '0);
    end
  end

endmodule
