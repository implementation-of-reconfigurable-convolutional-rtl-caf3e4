// tx_ctrl - transmit sequencer of the encoder side.
//
// start (while idle) latches the code configuration and the term flag,
// loads the DIP word into the shift register and clears the encoder. It
// then issues one encoder step every second clock: FRAME_LEN data bits
// taken from the shift register, followed, when term is set, by k-1 tail
// steps that return the encoder to state 0. The half rate matches the 2:1
// multiplexer, which needs two clocks per symbol. sof marks the encoder
// step whose symbol opens the frame; it is delayed one clock to line up
// with the encoder's registered output. busy stays high until the last
// symbol has left the multiplexer.
module tx_ctrl
  import cc_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  logic      term,
  input  code_cfg_t cfg,
  output code_cfg_t cfg_q,
  output logic      term_q,
  output logic      piso_load,
  output logic      piso_shift,
  output logic      enc_clr,
  output logic      enc_en,
  output logic      enc_tail,
  output logic      sof,
  output logic      busy
);

  localparam int unsigned LW = $clog2(FRAME_LEN + MMAX + 1);

  typedef enum logic [1:0] {T_IDLE, T_LOAD, T_RUN, T_DRAIN} tst_t;
  tst_t          st;
  logic [LW-1:0] n, len;
  logic          phase;
  logic [2:0]    drain;

  assign len = LW'(FRAME_LEN) + (term_q ? LW'(cfg_q.k - 1'b1) : '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= T_IDLE;
      cfg_q  <= code_for_k(4'd3);
      term_q <= 1'b0;
      n      <= '0;
      phase  <= 1'b0;
      drain  <= '0;
      sof    <= 1'b0;
    end else begin
      sof <= enc_en && (n == '0);
      unique case (st)
        T_IDLE: if (start) begin
          cfg_q  <= cfg;
          term_q <= term;
          st     <= T_LOAD;
        end
        T_LOAD: begin
          n     <= '0;
          phase <= 1'b0;
          st    <= T_RUN;
        end
        T_RUN: begin
          phase <= ~phase;
          if (!phase) begin
            n <= n + 1'b1;
            if (n + 1'b1 == len) begin
              st    <= T_DRAIN;
              drain <= 3'd4;
            end
          end
        end
        T_DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 3'd1) st <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    piso_load  = (st == T_LOAD);
    enc_clr    = (st == T_LOAD);
    enc_en     = (st == T_RUN) && !phase;
    enc_tail   = n >= LW'(FRAME_LEN);
    piso_shift = enc_en && !enc_tail;
    busy       = (st != T_IDLE);
  end

endmodule
