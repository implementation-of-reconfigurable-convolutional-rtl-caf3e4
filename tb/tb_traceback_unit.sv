// tb_traceback_unit - builds a decision memory (a model in the testbench)
// in which the path of a random data word, computed with the reference
// encoder's register contents, survives and all other decisions are
// random, then checks that the traceback returns the word, for every
// constraint length, feed-forward and recursive codes, and that it takes
// one clock per step.
module tb_traceback_unit;
  import cc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  localparam int DEPTH = 15;
  logic rst = 1, start = 0; logic [3:0] len = '0; logic [SW-1:0] start_state = '0;
  code_cfg_t cfg; logic [3:0] raddr; logic [SW-1:0] rstate; logic rbit;
  logic [DEPTH-1:0] bits; logic busy, done;
  logic [NSMAX-1:0] mem [DEPTH];
  assign rbit = mem[raddr][rstate];
  traceback_unit #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    @(negedge clk); rst = 0;
    for (int f = 0; f < 140; f++) begin
      automatic int k = 2 + f % 7, m = k - 1;
      automatic int n = 1 + $urandom % DEPTH;
      automatic logic [15:0] data = 16'($urandom);
      automatic logic [7:0] r = '0;   // r[i]: register bit delayed i
      automatic int cyc = 0;
      cfg = code_for_k(4'(k));
      if (f % 3 == 1) begin cfg.fb = 8'($urandom) & 8'hFE; cfg.g1 = 8'($urandom); cfg.g2 = 8'($urandom); end
      for (int t = 0; t < DEPTH; t++) mem[t] = {$urandom, $urandom, $urandom, $urandom};
      for (int t = 0; t < n; t++) begin
        automatic logic fbv = 0, w, oldest;
        automatic int nxt = 0;
        for (int i = 1; i <= m; i++) fbv ^= cfg.fb[i] & r[i];
        w = data[n-1-t] ^ fbv;
        oldest = r[m];
        for (int i = m; i >= 2; i--) r[i] = r[i-1];
        r[1] = w;
        for (int i = 1; i <= m; i++) nxt |= int'(r[i]) << (i - 1);
        mem[t][nxt] = oldest;
        start_state = SW'(nxt);
      end
      @(negedge clk); start = 1; len = 4'(n);
      @(negedge clk); start = 0;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      chk(cyc == n, $sformatf("k=%0d n=%0d takes %0d clocks", k, n, cyc));
      for (int t = 0; t < n; t++) chk(bits[t] == data[n-1-t], $sformatf("k=%0d f=%0d bit %0d", k, f, t));
      chk(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
