// tb_min_state_finder - random metric vectors for every constraint length;
// the result must be the lowest-index minimum among the active states only.
module tb_min_state_finder;
  import cc_pkg::*;
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
  logic [7:0] pm [NSMAX]; logic [3:0] k; logic [SW-1:0] best_state; logic [7:0] best_metric;
  min_state_finder #(.MW(8)) dut (.*);
  initial begin
    for (int i = 0; i < 400; i++) begin
      int ns, bi, bv;
      k = 4'(2 + i % 7); ns = 1 << (k - 1);
      for (int s = 0; s < NSMAX; s++) pm[s] = 8'(20 + $urandom % 40);
      if (i % 3 == 0) pm[ns + ($urandom % (NSMAX - ns + 1)) % (NSMAX - ns + 1) - ((ns == NSMAX) ? 1 : 0)] = 0;
      if (i % 4 == 1) begin pm[$urandom % ns] = 5; pm[$urandom % ns] = 5; end
      #1;
      bi = 0; bv = 1000;
      for (int s = 0; s < ns; s++) if (pm[s] < bv) begin bv = pm[s]; bi = s; end
      chk(int'(best_state) == bi && int'(best_metric) == bv, $sformatf("k=%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
