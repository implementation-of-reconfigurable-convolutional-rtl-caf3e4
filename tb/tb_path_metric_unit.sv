// tb_path_metric_unit - feeds noisy code sequences for every constraint
// length (built-in, random feed-forward and random recursive codes). After
// every step the smallest active metric must equal the distance found by
// exhaustive search over all data words of that length; after a
// terminated frame the metric of state 0 must equal the exhaustive
// distance over terminated words.
module tb_path_metric_unit;
  import cc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic rst = 1, init = 0, step = 0; logic [1:0] rx = '0; code_cfg_t cfg;
  logic [7:0] pm [NSMAX]; logic [NSMAX-1:0] dec;
  path_metric_unit #(.MW(8)) dut (.*);

  function automatic int min_active(input int k);
    int b = 1 << 20;
    for (int s = 0; s < (1 << (k - 1)); s++) if (int'(pm[s]) < b) b = int'(pm[s]);
    return b;
  endfunction

  initial begin
    sym_arr_t tx, rxs; logic [15:0] best; int dmin, nb, steps;
    @(negedge clk); rst = 0;
    for (int k = 2; k <= 8; k++) begin
      for (int rep = 0; rep < 6; rep++) begin
        automatic logic [15:0] data = 16'($urandom);
        automatic int n = 4 + $urandom % 6;
        automatic bit term = rep[0];
        cfg = code_for_k(4'(k));
        if (rep >= 2) begin
          cfg.g1 = 8'($urandom) | 8'h01; cfg.g2 = 8'($urandom) | 8'h01;
          cfg.fb = (rep >= 4) ? 8'($urandom) & 8'hFE : 8'h00;
        end
        steps = ref_encode(cfg, data, n, term, tx);
        rxs = tx;
        for (int e = 0; e < rep % 3 + 1; e++) begin
          automatic int p = $urandom % steps;
          rxs[p] ^= 2'(1 << ($urandom % 2));
        end
        for (int t = 0; t < steps; t++) begin
          @(negedge clk); init = (t == 0); step = 1; rx = rxs[t];
          @(negedge clk); step = 0; init = 0;
          if (!term || t < n) begin
            ml_decode(cfg, rxs, t + 1, 0, best, dmin, nb);
            chk(min_active(k) == dmin, $sformatf("k=%0d rep=%0d step %0d: %0d vs %0d", k, rep, t, min_active(k), dmin));
          end
        end
        if (term) begin
          ml_decode(cfg, rxs, n, 1, best, dmin, nb);
          chk(int'(pm[0]) == dmin, $sformatf("k=%0d terminated metric %0d vs %0d", k, pm[0], dmin));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
