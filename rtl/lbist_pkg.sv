// lbist_pkg: types and constants shared by the power-controlled logic BIST
// pattern generator.
//
// The TPG LFSR is a 16-bit internal (Galois) LFSR with characteristic
// polynomial x^16 + x^15 + x^13 + x^4 + 1 and seed 1010...1010, as in the
// reference configuration. POLY holds one bit per x^i term for i = 0..15
// (x^16 is implicit). The control approaches are the three switch-timing
// schemes (Basic, Swap, Moving) plus FIXED, in which every shift uses the
// same filter order (the plain single-filter generator the schemes are
// measured against).
package lbist_pkg;

  localparam int unsigned    TPG_LFSR_W    = 16;
  localparam logic [15:0]    TPG_LFSR_POLY = 16'hA011;  // x^15, x^13, x^4, x^0
  localparam logic [15:0]    TPG_LFSR_SEED = 16'hAAAA;  // 1010...1010

  // Switch-timing approach applied by switch_timing_ctrl.
  typedef enum logic [1:0] {
    APPR_FIXED  = 2'd0,  // whole chain filtered with order plpf_n
    APPR_BASIC  = 2'd1,  // head gamma / middle beta / tail alpha, all chains alike
    APPR_SWAP   = 2'd2,  // odd/even chains exchange head and tail every pattern
    APPR_MOVING = 2'd3   // middle part slides by one bit per pattern
  } approach_e;

  // One step of an internal-type LFSR of width W (W <= 32): the top stage
  // feeds back into every stage whose polynomial bit is set.
  function automatic logic [31:0] galois_step(input logic [31:0] s,
                                              input logic [31:0] poly,
                                              input int unsigned w);
    logic [31:0] mask;
    logic        fb;
    mask = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 32'd1);
    fb   = s[w-1];
    return ((s << 1) ^ (fb ? poly : 32'd0)) & mask;
  endfunction

  // Shortest run a filter of order n needs to reach its expected toggle
  // rate: E_n = 2^(n+2) - 2 (2, 6, 14, 30 for n = 0..3).
  function automatic int unsigned min_part_len(input int unsigned n);
    return (32'd1 << (n + 2)) - 32'd2;
  endfunction

endpackage
