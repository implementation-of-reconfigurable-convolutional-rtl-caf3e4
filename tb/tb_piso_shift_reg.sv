// tb_piso_shift_reg - loads random words and checks that they come out MSB
// first, one bit per shift, that load wins over shift and that the
// register holds without shift.
module tb_piso_shift_reg;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic rst = 1, load = 0, shift = 0, sout;
  logic [7:0] din = '0;
  piso_shift_reg #(.W(8)) dut (.*);
  initial begin
    @(negedge clk); rst = 0;
    chk(sout == 0, "reset clears");
    for (int w = 0; w < 40; w++) begin
      automatic logic [7:0] word = 8'($urandom);
      @(negedge clk); din = word; load = 1; shift = (w % 3 == 0);
      @(negedge clk); load = 0; shift = 0; din = ~word;
      for (int b = 7; b >= 0; b--) begin
        chk(sout == word[b], $sformatf("word %0d bit %0d", w, b));
        if (b == 4) begin @(negedge clk); chk(sout == word[b], "holds without shift"); end
        shift = 1; @(negedge clk); shift = 0;
      end
      chk(sout == 0, "empty after 8 shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
