// tb_viterbi_decoder - decodes the original design's trellis example, its worked
// encoding example, and random noisy frames for every constraint length
// (built-in, random feed-forward and random recursive codes, terminated
// and not), comparing word and error count with exhaustive
// maximum-likelihood search. Checks the latency of L+2 clocks from the last
// symbol of an L-step frame to data_valid, gaps in the symbol stream and a
// frame restarted by a second start-of-frame.
module tb_viterbi_decoder;
  import cc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic rst = 1, sym_valid = 0, sym_sof = 0, term = 0; logic [1:0] sym = '0;
  code_cfg_t cfg; logic [7:0] data, err_count; logic data_valid, err_flag, busy;
  viterbi_decoder #(.FRAME_LEN(8), .MW(8)) dut (.*);

  // Sends a frame and waits for the result; returns the clocks from the
  // last symbol to data_valid.
  task automatic run(input sym_arr_t rx, input int steps, input bit gaps, output int lat);
    for (int t = 0; t < steps; t++) begin
      @(negedge clk); sym_valid = 1; sym_sof = (t == 0); sym = rx[t];
      @(negedge clk); sym_valid = 0; sym_sof = 0;
      if (gaps && t < steps - 1 && $urandom % 3 == 0) repeat (1 + $urandom % 2) @(negedge clk);
      if (t < steps - 1) chk(busy, "busy during frame");
    end
    lat = 0;
    while (!data_valid && lat < 100) begin @(negedge clk); lat++; end
  endtask

  task automatic check_frame(input code_cfg_t c, input sym_arr_t rx, input bit tm, input bit gaps, input string what);
    logic [15:0] best; int dmin, nb, lat, steps; sym_arr_t re;
    steps = 8 + (tm ? int'(c.k) - 1 : 0);
    cfg = c; term = tm;
    run(rx, steps, gaps, lat);
    chk(lat == steps + 2, $sformatf("%s latency %0d", what, lat));
    ml_decode(c, rx, 8, tm, best, dmin, nb);
    chk(int'(err_count) == dmin && err_flag == (dmin != 0), $sformatf("%s err_count %0d vs %0d", what, err_count, dmin));
    if (nb == 1) chk(data == best[7:0], $sformatf("%s data %b vs %b", what, data, best[7:0]));
    else begin
      void'(ref_encode(c, {8'h0, data}, 8, tm, re));
      chk(hamming(re, rx, steps) == dmin, $sformatf("%s tied word distance", what));
    end
  endtask

  initial begin
    sym_arr_t rx, tx; int lat;
    cfg = code_for_k(4'd3);
    for (int i = 0; i < MAXSTEPS; i++) rx[i] = '0;
    @(negedge clk); rst = 0;
    // Trellis example: received 00 01 11 00 10 11 10 01. The word of least
    // distance (1) is 10011100.
    rx[0] = 2'b00; rx[1] = 2'b01; rx[2] = 2'b11; rx[3] = 2'b00;
    rx[4] = 2'b10; rx[5] = 2'b11; rx[6] = 2'b10; rx[7] = 2'b01;
    check_frame(code_for_k(4'd3), rx, 0, 0, "trellis example");
    chk(data == 8'b1001_1100 && err_count == 1, "trellis example word");
    // Worked example: 10010110 sent without errors.
    void'(ref_encode(code_for_k(4'd3), 16'h0096, 8, 0, tx));
    check_frame(code_for_k(4'd3), tx, 0, 0, "worked example");
    chk(data == 8'b1001_0110 && err_count == 0 && !err_flag, "worked example word");
    // Random frames.
    for (int f = 0; f < 126; f++) begin
      automatic int k = 2 + f % 7;
      automatic bit tm = f[3];
      automatic code_cfg_t c = code_for_k(4'(k));
      automatic int steps, nerr = f % 4;
      if (f % 3 == 1) begin c.g1 = 8'($urandom) | 8'h01; c.g2 = 8'($urandom) | 8'h01; end
      if (f % 6 == 2) c.fb = 8'($urandom) & 8'hFE;
      steps = ref_encode(c, 16'($urandom), 8, tm, rx);
      for (int e = 0; e < nerr; e++) rx[$urandom % steps] ^= 2'(1 << ($urandom % 2));
      check_frame(c, rx, tm, f[1], $sformatf("frame %0d k=%0d term=%0d", f, k, tm));
    end
    // Terminated frames with errors: the traceback must start in state 0
    // even when another state ends with a smaller metric.
    for (int f = 0; f < 60; f++) begin
      automatic int k = 3 + f % 6;
      automatic code_cfg_t c = code_for_k(4'(k));
      automatic int steps = ref_encode(c, 16'($urandom), 8, 1, rx);
      for (int e = 0; e < 2 + f % 2; e++) rx[steps - 1 - ($urandom % k)] ^= 2'(1 << ($urandom % 2));
      check_frame(c, rx, 1, 0, $sformatf("noisy tail %0d k=%0d", f, k));
    end
    // A start-of-frame in mid-frame restarts decoding.
    for (int t = 0; t < 3; t++) begin
      @(negedge clk); sym_valid = 1; sym_sof = (t == 0); sym = 2'($urandom);
      @(negedge clk); sym_valid = 0; sym_sof = 0;
    end
    void'(ref_encode(code_for_k(4'd5), 16'h00A7, 8, 1, tx));
    check_frame(code_for_k(4'd5), tx, 1, 0, "restarted frame");
    chk(data == 8'hA7 && err_count == 0, "restarted frame word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
