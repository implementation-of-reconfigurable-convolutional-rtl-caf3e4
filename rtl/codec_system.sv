// codec_system - the complete codec of the system block diagram: a word set
// on the DIP switches is shifted into the reconfigurable convolutional
// encoder, multiplexed onto one serial line, and decoded by the adaptive
// Viterbi decoder, whose result drives the LEDs.
//
// Transmit side: tx_ctrl, piso_shift_reg, conv_encoder, sym_mux. start
// sends dip_sw (MSB first) as one frame of FRAME_LEN symbols, followed by
// k-1 tail symbols when term is set. The line ch_tx_* carries one bit per
// clock; ch_tx_sof marks the first bit of a frame.
// Receive side: sym_demux, viterbi_decoder, adaptive_k_ctrl. The channel is
// not part of the design: ch_tx_* leave the block and ch_rx_* come back,
// so noise can be added outside (a plain loop-back is ch_rx = ch_tx).
//
// Code selection: with adapt_en the constraint length comes from
// adaptive_k_ctrl, driven by the error count of every decoded frame, and
// the taps from cc_pkg::code_for_k; otherwise manual_cfg is used as is.
// Both ends of the link sit in this block, so the decoder takes the
// configuration and term flag the transmitter latched for the frame.
// led/err_count/err_flag update with the one-clock led_valid pulse.
module codec_system
  import cc_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [FRAME_LEN-1:0] dip_sw,
  input  logic                 term,
  input  logic                 adapt_en,
  input  code_cfg_t            manual_cfg,
  output logic                 ch_tx_bit,
  output logic                 ch_tx_valid,
  output logic                 ch_tx_sof,
  input  logic                 ch_rx_bit,
  input  logic                 ch_rx_valid,
  input  logic                 ch_rx_sof,
  output logic [FRAME_LEN-1:0] led,
  output logic                 led_valid,
  output logic [7:0]           err_count,
  output logic                 err_flag,
  output logic [3:0]           k_active,
  output logic                 k_up,
  output logic                 k_down,
  output logic                 tx_busy,
  output logic                 rx_busy
);

  code_cfg_t cfg_sel, cfg_tx;
  logic      term_tx;
  logic      piso_load, piso_shift, enc_clr, enc_en, enc_tail, tx_sof;
  logic      data_bit, u_used, v_valid, mux_ready;
  logic [1:0] v;
  logic [3:0] k_ad;
  logic [1:0] rx_sym;
  logic       rx_sym_valid, rx_sym_sof;

  assign cfg_sel  = adapt_en ? code_for_k(k_ad) : manual_cfg;
  assign k_active = cfg_tx.k;

  tx_ctrl #(.FRAME_LEN(FRAME_LEN)) u_tx (
    .clk, .rst, .start, .term, .cfg(cfg_sel), .cfg_q(cfg_tx), .term_q(term_tx),
    .piso_load, .piso_shift, .enc_clr, .enc_en, .enc_tail, .sof(tx_sof),
    .busy(tx_busy)
  );

  piso_shift_reg #(.W(FRAME_LEN)) u_piso (
    .clk, .rst, .load(piso_load), .din(dip_sw), .shift(piso_shift),
    .sout(data_bit)
  );

  conv_encoder u_enc (
    .clk, .rst, .clr(enc_clr), .en(enc_en), .tail(enc_tail), .u(data_bit),
    .cfg(cfg_tx), .v, .v_valid, .u_used
  );

  sym_mux u_mux (
    .clk, .rst, .sym(v), .sym_valid(v_valid), .sof_in(tx_sof),
    .ready(mux_ready), .ser_bit(ch_tx_bit), .ser_valid(ch_tx_valid),
    .ser_sof(ch_tx_sof)
  );

  // The encoder offers a symbol every second clock, exactly the rate at
  // which the multiplexer empties.
  assert property (@(posedge clk) disable iff (rst) v_valid |-> mux_ready);

  sym_demux u_demux (
    .clk, .rst, .ser_bit(ch_rx_bit), .ser_valid(ch_rx_valid),
    .ser_sof(ch_rx_sof), .sym(rx_sym), .sym_valid(rx_sym_valid),
    .sym_sof(rx_sym_sof)
  );

  viterbi_decoder #(.FRAME_LEN(FRAME_LEN)) u_dec (
    .clk, .rst, .sym(rx_sym), .sym_valid(rx_sym_valid), .sym_sof(rx_sym_sof),
    .cfg(cfg_tx), .term(term_tx), .data(led), .data_valid(led_valid),
    .err_count, .err_flag, .busy(rx_busy)
  );

  adaptive_k_ctrl u_adapt (
    .clk, .rst, .frame_done(led_valid), .err_count, .k(k_ad), .k_up, .k_down
  );

endmodule
