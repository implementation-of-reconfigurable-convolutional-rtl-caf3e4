// tb_sym_demux - sends random frames bit by bit, with idle gaps and a
// misaligned stray bit before each frame, and checks that the symbols are
// paired again from the start-of-frame bit onward.
module tb_sym_demux;
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
  logic rst = 1, ser_bit = 0, ser_valid = 0, ser_sof = 0;
  logic [1:0] sym; logic sym_valid, sym_sof;
  sym_demux dut (.*);
  logic [1:0] exp_q [$];
  logic       exp_sof [$];
  always @(posedge clk) if (!rst && sym_valid) begin
    if (exp_q.size() == 0) chk(0, "unexpected symbol");
    else begin
      chk(sym == exp_q.pop_front(), "symbol value");
      chk(sym_sof == exp_sof.pop_front(), "symbol sof");
    end
  end
  task automatic send(input logic b, input logic s);
    @(negedge clk); ser_bit = b; ser_valid = 1; ser_sof = s;
    @(negedge clk); ser_valid = 0; ser_sof = 0;
    if ($urandom % 3 == 0) repeat ($urandom % 3) @(negedge clk);
  endtask
  initial begin
    @(negedge clk); rst = 0;
    for (int f = 0; f < 30; f++) begin
      send(1'($urandom), 0);          // stray bit before the frame
      for (int i = 0; i < 10; i++) begin
        automatic logic [1:0] s = 2'($urandom);
        exp_q.push_back(s); exp_sof.push_back(i == 0);
        send(s[1], i == 0);
        send(s[0], 0);
      end
    end
    repeat (4) @(negedge clk);
    chk(exp_q.size() == 0, "all symbols received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
