// tb_tx_ctrl - runs frames for every constraint length, with and without
// tail, and checks the control sequence: one load/clear, encoder steps
// exactly every second clock, FRAME_LEN data steps then k-1 tail steps,
// shifts only on data steps, one sof one clock after the first step, the
// configuration held for the frame and start ignored while busy.
module tb_tx_ctrl;
  import cc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic rst = 1, start = 0, term = 0;
  code_cfg_t cfg, cfg_q; logic term_q;
  logic piso_load, piso_shift, enc_clr, enc_en, enc_tail, sof, busy;
  tx_ctrl #(.FRAME_LEN(8)) dut (.*);
  initial begin
    cfg = code_for_k(4'd3);
    @(negedge clk); rst = 0;
    chk(!busy && !enc_en, "idle after reset");
    for (int f = 0; f < 28; f++) begin
      automatic int k = 2 + f % 7, n_en = 0, n_tail = 0, n_shift = 0, n_load = 0, n_sof = 0;
      automatic int last_en = -10, cyc = 0, first_en = -1, sof_cyc = -1;
      automatic bit gap_ok = 1, tail_order_ok = 1;
      automatic code_cfg_t c = code_for_k(4'(k));
      term = f[0] ^ f[3];
      cfg = c;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cfg = code_for_k(4'(2 + (f + 3) % 7)); term = ~term;
      while (busy && cyc < 200) begin
        if (cyc == 5) start = 1;   // must be ignored
        if (cyc == 6) start = 0;
        if (piso_load) begin n_load++; chk(enc_clr, "clear with load"); end
        if (enc_en) begin
          if (first_en < 0) first_en = cyc;
          if (last_en >= 0 && cyc - last_en != 2) gap_ok = 0;
          last_en = cyc; n_en++;
          if (enc_tail) n_tail++;
          else begin if (n_tail > 0) tail_order_ok = 0; if (piso_shift) n_shift++; end
          if (enc_tail && piso_shift) tail_order_ok = 0;
        end
        if (sof) begin n_sof++; sof_cyc = cyc; end
        chk(cfg_q == c && term_q == (f[0] ^ f[3]), "configuration held");
        @(negedge clk); cyc++;
      end
      chk(n_load == 1, "one load");
      chk(n_en == 8 + ((f[0] ^ f[3]) ? k - 1 : 0), $sformatf("steps k=%0d", k));
      chk(n_tail == ((f[0] ^ f[3]) ? k - 1 : 0), "tail steps");
      chk(n_shift == 8, "shifts");
      chk(gap_ok, "one step every second clock");
      chk(tail_order_ok, "tail after data, without shift");
      chk(n_sof == 1 && sof_cyc == first_en + 1, "sof");
      chk(cyc == 2 * n_en + 4, $sformatf("frame takes %0d clocks", cyc));
      repeat (2) @(negedge clk);
      chk(!busy, "start ignored while busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
