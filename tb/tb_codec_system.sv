// tb_codec_system - end-to-end test of the codec: DIP word -> encoder ->
// serial line -> channel model (bit flips, in this testbench) -> decoder ->
// LEDs. Each decoded word and error count is compared with exhaustive
// maximum-likelihood decoding of the bits that actually arrived. Covers
// the original design's code (K=3) and worked example, every constraint length in
// manual mode, terminated and unterminated frames, and the adaptive mode,
// in which noisy frames must raise and clean frames lower the constraint
// length. Also checks that the line carries two bits per encoder step,
// one per clock without gaps. Every mechanism is counted; one that never
// happens is a failure.
module tb_codec_system;
  import cc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic rst = 1, start = 0, term = 0, adapt_en = 0;
  logic [7:0] dip_sw = '0;
  code_cfg_t manual_cfg;
  logic ch_tx_bit, ch_tx_valid, ch_tx_sof;
  logic ch_rx_bit = 0, ch_rx_valid = 0, ch_rx_sof = 0;
  logic [7:0] led, err_count;
  logic led_valid, err_flag, k_up, k_down, tx_busy, rx_busy;
  logic [3:0] k_active;

  codec_system dut (.*);

  // Channel: one clock of delay; flips the bits whose index in the frame
  // is set in flip_mask. Records what was received.
  logic [31:0] flip_mask = '0;
  int  bit_idx = 0, gaps = 0;
  logic [1:0] got [MAXSTEPS];
  bit  was_valid = 0, in_frame = 0;
  always @(posedge clk) begin
    ch_rx_valid <= ch_tx_valid;
    ch_rx_sof   <= ch_tx_sof;
    if (ch_tx_valid) begin
      automatic int i = ch_tx_sof ? 0 : bit_idx;
      ch_rx_bit <= ch_tx_bit ^ flip_mask[i];
      if (i < 2 * MAXSTEPS) got[i / 2][1 - i % 2] = ch_tx_bit ^ flip_mask[i];
      bit_idx = i + 1;
      if (!ch_tx_sof && !was_valid && in_frame) gaps++;
      in_frame = 1;
    end
    was_valid = ch_tx_valid;
    if (!tx_busy) in_frame = 0;
  end

  // Mechanism counters.
  int n_term = 0, n_unterm = 0, n_corrected = 0, n_up = 0, n_down = 0,
      n_manual = 0, n_adapt = 0;
  int k_seen [16];
  always @(posedge clk) begin
    if (k_up) n_up++;
    if (k_down) n_down++;
  end

  // Sends one frame with nerr flipped bits and checks the result.
  task automatic frame(input logic [7:0] word, input bit tm, input int nerr, input string what);
    code_cfg_t c; int steps, cyc = 0; logic [15:0] best; int dmin, nb; sym_arr_t re;
    flip_mask = '0;
    @(negedge clk); dip_sw = word; term = tm; start = 1;
    @(negedge clk); start = 0;
    c = adapt_en ? code_for_k(k_active) : manual_cfg;
    steps = 8 + (tm ? int'(c.k) - 1 : 0);
    for (int e = 0; e < nerr; e++) flip_mask[$urandom % (2 * steps)] = 1'b1;
    bit_idx = 0;
    while (!led_valid && cyc < 400) begin @(negedge clk); cyc++; end
    chk(led_valid, {what, ": decoded"});
    chk(bit_idx == 2 * steps, $sformatf("%s: %0d line bits", what, bit_idx));
    ml_decode(c, got, 8, tm, best, dmin, nb);
    chk(int'(err_count) == dmin, $sformatf("%s: err_count %0d vs %0d", what, err_count, dmin));
    if (nb == 1) chk(led == best[7:0], $sformatf("%s: led %b vs %b", what, led, best[7:0]));
    else begin
      void'(ref_encode(c, {8'h0, led}, 8, tm, re));
      chk(hamming(re, got, steps) == dmin, {what, ": tied word"});
    end
    if (tm) n_term++; else n_unterm++;
    if (adapt_en) n_adapt++; else n_manual++;
    if (err_flag && led == word) n_corrected++;
    k_seen[c.k]++;
    @(negedge clk);
  endtask

  initial begin
    manual_cfg = code_for_k(4'd3);
    repeat (2) @(negedge clk);
    rst = 0;
    // The original code and worked example, clean and with one error.
    frame(8'b1001_0110, 0, 0, "worked example");
    chk(led == 8'b1001_0110 && !err_flag, "worked example word");
    frame(8'b1001_0110, 1, 1, "worked example, one error");
    chk(led == 8'b1001_0110 && err_flag, "worked example corrected");
    // Manual mode, every constraint length.
    for (int f = 0; f < 28; f++) begin
      manual_cfg = code_for_k(4'(2 + f % 7));
      frame(8'($urandom), f[2], f % 3, $sformatf("manual frame %0d", f));
    end
    // Adaptive mode: noisy frames, then clean frames.
    adapt_en = 1;
    for (int f = 0; f < 8; f++) frame(8'($urandom), 1, 3, $sformatf("noisy frame %0d", f));
    chk(k_active == 4'd8, "constraint length raised to 8");
    for (int f = 0; f < 30; f++) frame(8'($urandom), f[0], 0, $sformatf("clean frame %0d", f));
    chk(k_active == 4'd2, "constraint length lowered to 2");
    for (int f = 0; f < 6; f++) frame(8'($urandom), 1, 2, $sformatf("mixed frame %0d", f));
    // Mechanisms.
    chk(gaps == 0, "line sends one bit per clock");
    chk(n_term > 0 && n_unterm > 0, "terminated and unterminated frames");
    chk(n_corrected > 0, "channel errors corrected");
    chk(n_up > 0 && n_down > 0, "adaptive raise and lower");
    chk(n_manual > 0 && n_adapt > 0, "manual and adaptive modes");
    for (int k = 2; k <= 8; k++) chk(k_seen[k] > 0, $sformatf("constraint length %0d used", k));
    $display("frames: term %0d unterm %0d corrected %0d k_up %0d k_down %0d",
             n_term, n_unterm, n_corrected, n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
