// tb_conv_encoder - checks the reconfigurable encoder against the state
// table (literal lookup), the worked examples, and an independent
// bit-array encoder for every constraint length 2..8, feed-forward and
// recursive, with and without tail bits. Also checks the one-clock latency.
module tb_conv_encoder;
  import cc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, clr = 0, en = 0, tail = 0, u = 0;
  code_cfg_t cfg;
  logic [1:0] v;
  logic v_valid, u_used;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

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

  // Encodes one bit; returns the symbol after checking the latency.
  task automatic enc(input logic b, input logic tl, output logic [1:0] s, output logic uu);
    @(negedge clk); en = 1; u = b; tail = tl;
    @(negedge clk); en = 0; tail = 0;
    chk(v_valid, "v_valid one clock after en");
    s = v; uu = u_used;
  endtask

  task automatic clear();
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
  endtask

  // Encodes an n-bit word (MSB first) and compares with an expected string.
  task automatic word(input logic [15:0] d, input int n, input logic [31:0] exp, input string what);
    logic [1:0] s; logic uu;
    clear();
    for (int t = 0; t < n; t++) begin
      enc(d[n-1-t], 0, s, uu);
      chk(s == exp[2*(n-1-t) +: 2], $sformatf("%s symbol %0d", what, t));
    end
  endtask

  initial begin
    logic [1:0] s, st, exp_s;
    logic uu;
    logic [3:0] row;
    sym_arr_t ref_out;
    int steps;
    cfg = code_for_k(4'd3);
    repeat (3) @(negedge clk);
    rst = 0;
    // State table, followed for a long random input stream.
    clear(); st = 2'b00;
    for (int i = 0; i < 300; i++) begin
      automatic logic b = 1'($urandom);
      row = table1(b, st);
      enc(b, 0, s, uu);
      chk(s == row[1:0], $sformatf("state table step %0d", i));
      st = row[3:2];
    end
    // Worked examples of the original design.
    word(16'b1001_0110, 8, 32'b10_01_11_00_00_10_11_10, "10010110");
    word(16'b1001_1101, 8, 32'b10_01_11_00_10_11_10_11, "10011101");
    // Every constraint length, built-in codes and random recursive codes.
    for (int k = 2; k <= 8; k++) begin
      for (int rep = 0; rep < 6; rep++) begin
        automatic logic [15:0] data = 16'($urandom);
        automatic int n = 1 + ($urandom % 12);
        automatic bit term = rep[0];
        cfg = code_for_k(4'(k));
        if (rep >= 2) begin
          cfg.g1 = 8'($urandom) | 8'h01;
          cfg.g2 = 8'($urandom);
          cfg.fb = (rep >= 4) ? (8'($urandom) & 8'hFE) : 8'h00;
          cfg.g1 &= 8'((1 << k) - 1); cfg.g2 &= 8'((1 << k) - 1); cfg.fb &= 8'((1 << k) - 1);
        end
        steps = ref_encode(cfg, data, n, term, ref_out);
        clear();
        for (int t = 0; t < steps; t++) begin
          enc(t < n ? data[n-1-t] : 1'b0, t >= n, s, uu);
          chk(s == ref_out[t], $sformatf("k=%0d rep=%0d step %0d got %b exp %b cfg %h n=%0d data %h", k, rep, t, s, ref_out[t], cfg, n, data));
        end
        if (term) begin
          // Back in state 0: a zero input now gives the all-zero symbol.
          enc(1'b0, 0, s, uu);
          chk(s == 2'b00, $sformatf("k=%0d tail returns to state 0", k));
        end
      end
    end
    // The feed-forward sketch of the original design, Y0 = K^S0 and
    // Y1 = S0^S1 over the last three input bits, as taps g1=3, g2=6.
    cfg = '{k: 4'd3, g1: 8'h03, g2: 8'h06, fb: 8'h00};
    clear();
    begin
      automatic logic [2:0] hist = '0;   // hist[0] newest input
      for (int i = 0; i < 100; i++) begin
        automatic logic b = 1'($urandom);
        hist = {hist[1:0], b};
        enc(b, 0, s, uu);
        chk(s == {hist[0] ^ hist[1], hist[1] ^ hist[2]}, $sformatf("feed-forward sketch step %0d", i));
      end
    end
    // Tail echo: with the state-table code the tail bit equals the feedback.
    cfg = code_for_k(4'd3);
    clear();
    enc(1'b1, 0, s, uu);
    enc(1'b0, 1, s, uu);
    exp_s = 2'b11;
    chk(uu == 1'b1 && s == exp_s, "tail bit from state after 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
