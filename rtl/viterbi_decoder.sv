// viterbi_decoder - frame-based, hard-decision, rate-1/2 Viterbi decoder
// whose constraint length (2..KMAX) and taps are chosen at run time.
//
// Dataflow: branch_metric -> path_metric_unit (all 2^(KMAX-1) ACS
// elements in parallel, one trellis step per received symbol) ->
// survivor_memory (one decision row per step) -> traceback_unit. After the
// last step the start state of the traceback is chosen: state 0 when the
// frame is terminated (term: the encoder appended k-1 tail bits), otherwise
// the state of smallest metric (min_state_finder). The metric of that
// state, the number of corrected channel bit errors, goes to the
// error_detector.
//
// Interface: symbols arrive as {v1,v2} with sym_valid, at most one per
// clock; sym_sof marks the first symbol of a frame and latches cfg and
// term for the whole frame (a sym_sof in mid-frame restarts the frame).
// A frame has FRAME_LEN data symbols plus k-1 tail symbols when term is set.
// Timing: one clock per symbol, one clock to pick the start state, one per
// trellis step of traceback, then data (first decoded bit in the MSB),
// err_count and err_flag update together with a one-clock data_valid.
// Symbols that arrive while busy after the frame's last one are ignored.
module viterbi_decoder
  import cc_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 8,
  parameter int unsigned MW        = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [1:0]           sym,
  input  logic                 sym_valid,
  input  logic                 sym_sof,
  input  code_cfg_t            cfg,
  input  logic                 term,
  output logic [FRAME_LEN-1:0] data,
  output logic                 data_valid,
  output logic [7:0]           err_count,
  output logic                 err_flag,
  output logic                 busy
);

  localparam int unsigned DEPTH = FRAME_LEN + MMAX;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned LW    = $clog2(DEPTH + 1);

  // Largest path metric of a frame (2 per step) plus the start penalty
  // must fit in MW bits.
  initial assert ((1 << (MW - 1)) + 2 * DEPTH < (1 << MW))
    else $error("MW too small for FRAME_LEN");

  typedef enum logic [1:0] {S_IDLE, S_ACS, S_PICK, S_TB} st_t;
  st_t st;

  code_cfg_t cfg_q, cfg_use;
  logic      term_q;
  logic [LW-1:0] cnt, len;

  logic                 step, init;
  logic [MW-1:0]        pm [NSMAX];
  logic [NSMAX-1:0]     dec;
  logic [SW-1:0]        best_state, tb_state;
  logic [MW-1:0]        best_metric;
  logic [AW-1:0]        raddr;
  logic [SW-1:0]        rstate;
  logic                 rbit;
  logic [DEPTH-1:0]     tb_bits;
  logic                 tb_busy, tb_done, tb_start;

  // A symbol is taken in S_IDLE only when it opens a frame.
  always_comb begin
    init    = sym_valid && sym_sof && (st == S_IDLE || st == S_ACS);
    step    = init || (sym_valid && st == S_ACS);
    cfg_use = init ? cfg : cfg_q;
    len     = LW'(FRAME_LEN) + (term_q ? LW'(cfg_q.k - 1'b1) : '0);
  end

  path_metric_unit #(.MW(MW)) u_pmu (
    .clk, .rst, .init, .step, .rx(sym), .cfg(cfg_use), .pm, .dec
  );

  survivor_memory #(.DEPTH(DEPTH), .NS(NSMAX)) u_smu (
    .clk, .we(step), .waddr(init ? '0 : AW'(cnt)), .wdata(dec),
    .raddr, .rstate, .rbit
  );

  min_state_finder #(.MW(MW)) u_min (
    .pm, .k(cfg_q.k), .best_state, .best_metric
  );

  assign tb_state = term_q ? '0 : best_state;
  assign tb_start = (st == S_PICK);

  traceback_unit #(.DEPTH(DEPTH)) u_tbu (
    .clk, .rst, .start(tb_start), .len, .start_state(tb_state), .cfg(cfg_q),
    .raddr, .rstate, .rbit, .bits(tb_bits), .busy(tb_busy), .done(tb_done)
  );

  error_detector #(.MW(MW)) u_err (
    .clk, .rst, .capture(tb_start), .metric(term_q ? pm[0] : best_metric),
    .err_count, .err_flag
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      cfg_q      <= code_for_k(4'd3);
      term_q     <= 1'b0;
      cnt        <= '0;
      data       <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      unique case (st)
        S_IDLE, S_ACS: begin
          if (step) begin
            if (init) begin
              cfg_q  <= cfg;
              term_q <= term;
              cnt    <= LW'(1);
            end else begin
              cnt <= cnt + 1'b1;
            end
            st <= S_ACS;
            // Last symbol of the frame: the length uses the latched
            // configuration, or the incoming one for a frame of one symbol.
            if ((init ? LW'(1) : cnt + 1'b1) ==
                (init ? LW'(FRAME_LEN) + (term ? LW'(cfg.k - 1'b1) : '0) : len))
              st <= S_PICK;
          end
        end
        S_PICK: st <= S_TB;
        S_TB: begin
          if (tb_done) begin
            for (int i = 0; i < FRAME_LEN; i++)
              data[FRAME_LEN-1-i] <= tb_bits[i];
            data_valid <= 1'b1;
            st         <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE) || tb_busy;

endmodule
