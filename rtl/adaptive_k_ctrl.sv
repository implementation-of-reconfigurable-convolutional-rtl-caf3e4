// adaptive_k_ctrl - picks the constraint length from the channel quality.
//
// The number of bit errors corrected in each decoded frame serves as the
// estimate of the channel's SNR. After a frame with HI_TH or more errors
// the constraint length k is raised by one (stronger code); after
// CLEAN_FRAMES consecutive frames without errors it is lowered by one
// (cheaper, faster code). k stays within KLO..KHI (by default the
// package's KMIN..KMAX) and starts at KINIT.
// Updates take effect one clock after frame_done.
module adaptive_k_ctrl
  import cc_pkg::*;
#(
  parameter int unsigned KLO          = KMIN,
  parameter int unsigned KHI          = KMAX,
  parameter int unsigned KINIT        = 3,
  parameter int unsigned HI_TH        = 2,
  parameter int unsigned CLEAN_FRAMES = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       frame_done,
  input  logic [7:0] err_count,
  output logic [3:0] k,
  output logic       k_up,
  output logic       k_down
);

  logic [7:0] clean;

  always_ff @(posedge clk) begin
    if (rst) begin
      k      <= 4'(KINIT);
      clean  <= '0;
      k_up   <= 1'b0;
      k_down <= 1'b0;
    end else begin
      k_up   <= 1'b0;
      k_down <= 1'b0;
      if (frame_done) begin
        if (err_count >= 8'(HI_TH)) begin
          clean <= '0;
          if (k < 4'(KHI)) begin
            k    <= k + 1'b1;
            k_up <= 1'b1;
          end
        end else if (err_count == '0) begin
          if (clean + 1'b1 >= 8'(CLEAN_FRAMES)) begin
            clean <= '0;
            if (k > 4'(KLO)) begin
              k      <= k - 1'b1;
              k_down <= 1'b1;
            end
          end else begin
            clean <= clean + 1'b1;
          end
        end else begin
          clean <= '0;
        end
      end
    end
  end

endmodule
