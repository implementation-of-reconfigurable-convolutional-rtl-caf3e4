// tb_sym_mux - offers symbols every second clock, with gaps, and checks
// that the serial line carries v1 then v2 of each, in order, with
// ser_sof only on the first bit of a frame and ready as specified.
module tb_sym_mux;
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
  logic rst = 1, sym_valid = 0, sof_in = 0;
  logic [1:0] sym = '0;
  logic ready, ser_bit, ser_valid, ser_sof;
  sym_mux dut (.*);
  logic [1:0] sent [$];
  logic       sofs [$];
  int nbits = 0;
  logic first_bit;
  logic first_sof;
  always @(posedge clk) if (!rst && ser_valid) begin
    if (nbits % 2 == 0) begin first_bit = ser_bit; first_sof = ser_sof; end
    else begin
      logic [1:0] e; logic es;
      e = sent.pop_front(); es = sofs.pop_front();
      chk({first_bit, ser_bit} == e, $sformatf("symbol %0d bits", nbits/2));
      chk(first_sof == es, $sformatf("symbol %0d sof", nbits/2));
      chk(!ser_sof, "sof not on second bit");
    end
    nbits++;
  end
  initial begin
    @(negedge clk); rst = 0;
    chk(ready && !ser_valid, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      chk(ready, "ready every second clock");
      sym = 2'($urandom); sym_valid = 1; sof_in = (i % 10 == 0);
      sent.push_back(sym); sofs.push_back(sof_in);
      @(negedge clk); sym_valid = 0; sof_in = 0;
      chk(!ready, "busy with first bit");
      if ($urandom % 4 == 0) repeat (1 + $urandom % 3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(nbits == 600 && sent.size() == 0, "all bits sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
