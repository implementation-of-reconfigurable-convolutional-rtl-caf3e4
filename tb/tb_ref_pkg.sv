// tb_ref_pkg - reference models for the testbenches, written independently
// of the RTL: the original design's state table as a literal lookup, an encoder
// that steps its register one bit at a time, and an exhaustive
// maximum-likelihood decoder that tries every data word of a short frame.
package tb_ref_pkg;
  import cc_pkg::code_cfg_t;

  localparam int MAXSTEPS = 24;
  typedef logic [1:0] sym_arr_t [MAXSTEPS];

  // State table: {next S1 S0, v1 v2} for input u from state {S1,S0}.
  function automatic logic [3:0] table1(input logic u, input logic [1:0] s);
    case ({u, s})
      3'b0_00: return 4'b00_00;
      3'b1_00: return 4'b01_10;
      3'b0_01: return 4'b10_01;
      3'b1_01: return 4'b11_11;
      3'b0_10: return 4'b11_11;
      3'b1_10: return 4'b10_01;
      3'b0_11: return 4'b01_10;
      default: return 4'b00_00;
    endcase
  endfunction

  // Encodes n data bits (data[n-1] first) and, if term, k-1 tail bits.
  function automatic int ref_encode(input code_cfg_t c, input logic [15:0] data,
                                    input int n, input bit term,
                                    output sym_arr_t out);
    logic [7:0] r;
    int m, steps;
    m = int'(c.k) - 1;
    steps = n + (term ? m : 0);
    r = '0;
    for (int i = 0; i < MAXSTEPS; i++) out[i] = '0;
    for (int t = 0; t < steps; t++) begin
      bit fbv, u, w, v1, v2;
      fbv = 0;
      for (int i = 1; i <= m; i++) fbv ^= c.fb[i] & r[i];
      u  = (t < n) ? data[n-1-t] : fbv;
      w  = u ^ fbv;
      v1 = c.g1[0] & w;
      v2 = c.g2[0] & w;
      for (int i = 1; i <= m; i++) begin
        v1 ^= c.g1[i] & r[i];
        v2 ^= c.g2[i] & r[i];
      end
      out[t] = {v1, v2};
      for (int i = m; i >= 2; i--) r[i] = r[i-1];
      r[1] = w;
    end
    return steps;
  endfunction

  function automatic int hamming(input sym_arr_t a, input sym_arr_t b, input int steps);
    int d = 0;
    for (int t = 0; t < steps; t++) d += int'(a[t][1] != b[t][1]) + int'(a[t][0] != b[t][0]);
    return d;
  endfunction

  // Exhaustive ML decoding of an n-bit frame: smallest distance, the first
  // data word reaching it and how many words reach it.
  function automatic void ml_decode(input code_cfg_t c, input sym_arr_t rx,
                                    input int n, input bit term,
                                    output logic [15:0] best, output int dmin,
                                    output int nbest);
    sym_arr_t cand;
    int steps, d;
    dmin = 1 << 20; nbest = 0; best = '0;
    for (int w = 0; w < (1 << n); w++) begin
      steps = ref_encode(c, 16'(w), n, term, cand);
      d = hamming(cand, rx, steps);
      if (d < dmin) begin dmin = d; best = 16'(w); nbest = 1; end
      else if (d == dmin) nbest++;
    end
  endfunction

endpackage
