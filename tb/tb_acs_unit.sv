// tb_acs_unit - random and corner metrics: the output is the smaller sum,
// the decision names its predecessor, ties keep predecessor 0.
module tb_acs_unit;
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
  logic [7:0] pm0, pm1, pm_out; logic [1:0] bm0, bm1; logic dec;
  acs_unit #(.MW(8)) dut (.*);
  initial begin
    for (int i = 0; i < 500; i++) begin
      int a, b;
      pm0 = 8'($urandom % 200); pm1 = (i % 5 == 0) ? pm0 : 8'($urandom % 200);
      bm0 = 2'($urandom % 3); bm1 = (i % 5 == 0) ? bm0 : 2'($urandom % 3);
      #1;
      a = pm0 + bm0; b = pm1 + bm1;
      chk(int'(pm_out) == ((b < a) ? b : a), "metric");
      chk(dec == (b < a), "decision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
