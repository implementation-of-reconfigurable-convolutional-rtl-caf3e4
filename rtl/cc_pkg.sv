// cc_pkg - shared types and constants of the rate-1/2 convolutional codec.
//
// A code is described by code_cfg_t: the constraint length k (2..KMAX) and
// three tap masks over the encoder register r = {s[k-1], ..., s[1], w},
// where w is the bit entering the shift register and s[i] is the bit
// delayed by i clocks. Bit i of a mask is the tap on delay i (bit 0 = w).
//   w  = u ^ parity(fb & {s, 0})        (fb = 0 gives a feed-forward code)
//   v1 = parity(g1 & r),  v2 = parity(g2 & r)
// The trellis state is {s[k-1], ..., s[1]} with s[1] in bit 0, so the next
// state is ((state << 1) | w) limited to k-1 bits for every code.
//
// code_for_k() is the built-in code table used when the constraint length
// is chosen adaptively. Its K=3 entry is the original design's state table
// (listed in the README), a recursive code, written in this controller form as
// fb=6, g1=3, g2=2. The other entries are commonly used maximum free
// distance feed-forward codes; they are this design's choice.
package cc_pkg;

  localparam int unsigned KMAX = 8;           // largest constraint length
  localparam int unsigned KMIN = 2;           // smallest constraint length
  localparam int unsigned MMAX = KMAX - 1;    // largest encoder memory
  localparam int unsigned NSMAX = 1 << MMAX;  // trellis states at KMAX
  localparam int unsigned PW = KMAX;          // width of a tap mask
  localparam int unsigned SW = MMAX;          // width of a state index

  typedef struct packed {
    logic [3:0]    k;    // constraint length
    logic [PW-1:0] g1;   // taps of the first output
    logic [PW-1:0] g2;   // taps of the second output
    logic [PW-1:0] fb;   // feedback taps (bit 0 unused)
  } code_cfg_t;

  function automatic logic parity(input logic [PW-1:0] x);
    return ^x;
  endfunction

  // Mask of the k-1 state bits.
  function automatic logic [SW-1:0] state_mask(input logic [3:0] k);
    return SW'((1 << (k - 1)) - 1);
  endfunction

  // Code symbol {v1, v2} of the branch leaving state s with register bit w.
  function automatic logic [1:0] branch_sym(input code_cfg_t c,
                                            input logic [SW-1:0] s,
                                            input logic w);
    logic [PW-1:0] r;
    r = {s & state_mask(c.k), w};
    return {parity(c.g1 & r), parity(c.g2 & r)};
  endfunction

  // Built-in code table, tap masks in the bit order described above.
  function automatic code_cfg_t code_for_k(input logic [3:0] k);
    code_cfg_t c;
    c.k = k;
    c.fb = '0;
    unique case (k)
      4'd2:    begin c.g1 = 8'h03; c.g2 = 8'h02; end            // (3,1)
      4'd3:    begin c.g1 = 8'h03; c.g2 = 8'h02; c.fb = 8'h06; end // original state table
      4'd4:    begin c.g1 = 8'h0B; c.g2 = 8'h0F; end            // (15,17)
      4'd5:    begin c.g1 = 8'h19; c.g2 = 8'h17; end            // (23,35)
      4'd6:    begin c.g1 = 8'h35; c.g2 = 8'h2F; end            // (53,75)
      4'd7:    begin c.g1 = 8'h4F; c.g2 = 8'h6D; end            // (171,133)
      default: begin c.k = 4'd8; c.g1 = 8'h9F; c.g2 = 8'hE5; end // (371,247)
    endcase
    return c;
  endfunction

endpackage
