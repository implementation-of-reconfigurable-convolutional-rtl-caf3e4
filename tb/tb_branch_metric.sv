// tb_branch_metric - all 16 pairs of received and expected symbols against
// a table of Hamming distances.
module tb_branch_metric;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [1:0] rx; logic [1:0] bm [4];
  branch_metric dut (.*);
  // Distance table, row = received, column = expected.
  localparam int D [4][4] = '{'{0,1,1,2}, '{1,0,2,1}, '{1,2,0,1}, '{2,1,1,0}};
  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r); #1;
      for (int e = 0; e < 4; e++) chk(int'(bm[e]) == D[r][e], $sformatf("rx=%0d e=%0d", r, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
