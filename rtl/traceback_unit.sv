// traceback_unit - recovers the decoded bits from the survivor memory.
//
// start (one clock) loads the final state and the number of trellis steps
// len; the unit then walks backwards one step per clock, t = len-1 .. 0.
// At step t it reads decision d of the current state n from the survivor
// memory (raddr = t, rstate = n), forms the predecessor
// p = (n >> 1) | d * 2^(k-2), and the input bit of that branch,
// u = n[0] ^ feedback(p): the newest register bit with the feedback of a
// recursive code removed. u is stored in bits[t]. done pulses one clock
// after step 0; bits then holds the frame, bit t = t-th symbol's input.
module traceback_unit
  import cc_pkg::*;
#(
  parameter int unsigned DEPTH = 15
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [$clog2(DEPTH+1)-1:0] len,
  input  logic [SW-1:0]            start_state,
  input  code_cfg_t                cfg,
  output logic [$clog2(DEPTH)-1:0] raddr,
  output logic [SW-1:0]            rstate,
  input  logic                     rbit,
  output logic [DEPTH-1:0]         bits,
  output logic                     busy,
  output logic                     done
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0] t;
  logic [SW-1:0] n;
  logic [SW-1:0] pred;
  logic          u;

  always_comb begin
    pred   = (n >> 1) | (rbit ? (SW'(1) << (cfg.k - 2)) : '0);
    u      = n[0] ^ parity(cfg.fb & {pred & state_mask(cfg.k), 1'b0});
    raddr  = t;
    rstate = n;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t    <= '0;
      n    <= '0;
      bits <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        t    <= AW'(len - 1'b1);
        n    <= start_state;
        bits <= '0;
        busy <= (len != 0);
      end else if (busy) begin
        bits[t] <= u;
        n       <= pred;
        t       <= t - 1'b1;
        if (t == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
