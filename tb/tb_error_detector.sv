// tb_error_detector - the count and flag follow the captured metric and
// hold between captures.
module tb_error_detector;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic rst = 1, capture = 0; logic [7:0] metric = '0, err_count; logic err_flag;
  error_detector #(.MW(8)) dut (.*);
  initial begin
    @(negedge clk); rst = 0;
    chk(err_count == 0 && !err_flag, "reset");
    for (int i = 0; i < 100; i++) begin
      automatic logic [7:0] m = (i % 3 == 0) ? 8'd0 : (i % 3 == 1) ? 8'd1 : 8'($urandom % 40);
      metric = m; capture = 1; @(negedge clk); capture = 0;
      metric = 8'($urandom);
      chk(err_count == m && err_flag == (m != 0), "captured");
      @(negedge clk);
      chk(err_count == m, "holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
