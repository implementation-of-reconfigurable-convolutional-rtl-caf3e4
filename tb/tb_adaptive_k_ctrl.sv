// tb_adaptive_k_ctrl - drives random per-frame error counts and compares
// the chosen constraint length with a model of the rule: up after a frame
// with HI_TH or more errors, down after CLEAN_FRAMES clean frames, limits.
module tb_adaptive_k_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic rst = 1, frame_done = 0; logic [7:0] err_count = '0; logic [3:0] k; logic k_up, k_down;
  adaptive_k_ctrl #(.KLO(2), .KHI(8), .KINIT(3), .HI_TH(2), .CLEAN_FRAMES(4)) dut (.*);
  int mk = 3, clean = 0, ups = 0, downs = 0;
  initial begin
    @(negedge clk); rst = 0;
    chk(k == 3, "initial k");
    for (int i = 0; i < 600; i++) begin
      int e;
      // Bursts of noisy and of clean frames, so both limits are reached.
      e = ((i / 40) % 2 == 0) ? (($urandom % 3 == 0) ? 3 : 0) : 0;
      if ((i / 40) % 2 == 0 && i % 40 < 20) e = 2 + $urandom % 3;
      if ($urandom % 7 == 0) e = 1;
      err_count = 8'(e); frame_done = 1;
      @(negedge clk); frame_done = 0;
      if (e >= 2) begin clean = 0; if (mk < 8) begin mk++; chk(k_up, "k_up pulse"); ups++; end end
      else if (e == 0) begin clean++; if (clean == 4) begin clean = 0; if (mk > 2) begin mk--; chk(k_down, "k_down pulse"); downs++; end end end
      else clean = 0;
      chk(int'(k) == mk, $sformatf("frame %0d k=%0d model %0d", i, k, mk));
      err_count = 8'($urandom);
      repeat ($urandom % 3) @(negedge clk);
      chk(int'(k) == mk, "k holds between frames");
    end
    chk(ups > 0 && downs > 0, "both directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
