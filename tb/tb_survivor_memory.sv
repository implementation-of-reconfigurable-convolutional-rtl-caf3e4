// tb_survivor_memory - writes random decision rows and reads every bit
// back against a copy kept in the testbench.
module tb_survivor_memory;
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
  logic we = 0; logic [3:0] waddr = '0, raddr = '0; logic [127:0] wdata = '0;
  logic [6:0] rstate = '0; logic rbit;
  logic [127:0] model [15];
  survivor_memory #(.DEPTH(15), .NS(128)) dut (.*);
  initial begin
    for (int r = 0; r < 15; r++) begin
      @(negedge clk); we = 1; waddr = 4'(r);
      wdata = {$urandom, $urandom, $urandom, $urandom}; model[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      raddr = 4'($urandom % 15); rstate = 7'($urandom); #1;
      chk(rbit == model[raddr][rstate], "read bit");
    end
    // Overwrite one row and check that the others are unchanged.
    @(negedge clk); we = 1; waddr = 4'd7; wdata = ~model[7]; model[7] = wdata;
    @(negedge clk); we = 0;
    for (int r = 0; r < 15; r++) for (int s = 0; s < 128; s += 9) begin
      raddr = 4'(r); rstate = 7'(s); #1;
      chk(rbit == model[r][s], "after rewrite");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
