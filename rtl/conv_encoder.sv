// conv_encoder - reconfigurable rate-1/2 convolutional encoder.
//
// The constraint length (2..KMAX), both generator tap masks and a feedback
// tap mask are taken from cfg at every encoded bit, so the same hardware
// produces feed-forward and recursive codes (see cc_pkg for the bit order).
// The original design's default code, given as a state table for K=3, is recursive and is
// obtained with cc_pkg::code_for_k(3).
//
// Interface and timing: when en is high, u is encoded; the symbol {v1,v2}
// appears on v with v_valid one clock later and the register advances.
// With tail high the input bit is replaced by the feedback value so that
// the register input is 0: K-1 such bits return any code to state 0 (the
// reset sequence that lets the decoder trace back from state 0). The bit
// actually encoded is echoed on u_used. clr (or rst) empties the register
// and takes priority over en. Reset is synchronous, active high.
module conv_encoder
  import cc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      clr,
  input  logic      en,
  input  logic      tail,
  input  logic      u,
  input  code_cfg_t cfg,
  output logic [1:0] v,
  output logic      v_valid,
  output logic      u_used
);

  logic [SW-1:0] state;
  logic          fbk, w, u_eff;

  always_comb begin
    fbk   = parity(cfg.fb & {state & state_mask(cfg.k), 1'b0});
    u_eff = tail ? fbk : u;
    w     = u_eff ^ fbk;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      state   <= '0;
      v       <= '0;
      v_valid <= 1'b0;
      u_used  <= 1'b0;
    end else begin
      v_valid <= en;
      if (en) begin
        v      <= branch_sym(cfg, state, w);
        u_used <= u_eff;
        state  <= {state[SW-2:0], w} & state_mask(cfg.k);
      end
    end
  end

endmodule
