// path_metric_unit - state metric update of the Viterbi decoder.
//
// Holds one path metric per trellis state for the largest constraint
// length (NSMAX = 2^(KMAX-1) states) and updates all of them in parallel,
// one trellis step per clock with step high. The constraint length k of
// cfg is a run-time input: state n (n < 2^(k-1)) is reached from
// p0 = n >> 1 and p1 = p0 | 2^(k-2), both with register bit w = n[0], so the
// butterfly wiring is the same for feed-forward and recursive codes; only
// the expected branch symbols (cc_pkg::branch_sym) depend on the taps.
// States at or above 2^(k-1) keep the start penalty and are never read.
//
// init high with step uses the start metrics (0 for state 0, PEN for all
// others: every frame begins in state 0) as the source of the step. dec is
// the combinational decision vector of the current step, valid while step
// is high; pm is the registered metric vector.
module path_metric_unit
  import cc_pkg::*;
#(
  parameter int unsigned MW = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            init,
  input  logic            step,
  input  logic [1:0]      rx,
  input  code_cfg_t       cfg,
  output logic [MW-1:0]   pm  [NSMAX],
  output logic [NSMAX-1:0] dec
);

  localparam logic [MW-1:0] PEN = MW'(1) << (MW - 1);

  logic [1:0]    bm [4];
  logic [MW-1:0] src [NSMAX];
  logic [MW-1:0] nxt [NSMAX];
  logic [SW-1:0] hi_bit;

  branch_metric u_bm (.rx(rx), .bm(bm));

  always_comb begin
    hi_bit = SW'(1) << (cfg.k - 2);
    for (int s = 0; s < NSMAX; s++)
      src[s] = init ? ((s == 0) ? '0 : PEN) : pm[s];
  end

  for (genvar n = 0; n < NSMAX; n++) begin : g_state
    logic [SW-1:0] p0, p1;
    logic [1:0]    e0, e1;
    logic          active;
    always_comb begin
      p0     = SW'(n >> 1) & ~hi_bit;
      p1     = p0 | hi_bit;
      active = (SW'(n) & ~state_mask(cfg.k)) == '0;
      e0     = branch_sym(cfg, p0, n[0]);
      e1     = branch_sym(cfg, p1, n[0]);
    end
    logic [MW-1:0] acs_pm;
    logic          acs_dec;
    acs_unit #(.MW(MW)) u_acs (
      .pm0(src[p0]), .pm1(src[p1]), .bm0(bm[e0]), .bm1(bm[e1]),
      .pm_out(acs_pm), .dec(acs_dec)
    );
    assign nxt[n] = active ? acs_pm : PEN;
    assign dec[n] = active && acs_dec;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NSMAX; s++) pm[s] <= (s == 0) ? '0 : PEN;
    end else if (step) begin
      pm <= nxt;
    end
  end

endmodule
