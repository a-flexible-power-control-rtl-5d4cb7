// psf: phase shifter for filter.
//
// For every scan chain c it delivers the current bit T_j and the future bits
// T_j+1 .. T_j+N_MAX that the low-pass filters look ahead at. T_j of chain c
// is LFSR stage TAP(c) = (c * TAP_STRIDE) mod WIDTH (stride 1 gives the
// stage-per-chain assignment of the 4-bit example: chain 1 takes FF1, chain
// 2 FF2, ...). Because the LFSR is linear, the value that stage will hold k
// steps later is an XOR of present stages; the XOR masks are worked out at
// elaboration by stepping each unit vector k times through the LFSR
// function. No state: t is a pure function of lfsr_state.
//
// Interface: t[c][k] is T_j+k for chain c. Valid in the same cycle as
// lfsr_state; T_j+k equals T_j after k more LFSR steps.
// The tap stride is this design's own choice; the mask construction follows
// the example exactly (it reproduces its T_j+1 and T_j+2 table).
module psf #(
  parameter int unsigned      WIDTH      = lbist_pkg::TPG_LFSR_W,
  parameter logic [WIDTH-1:0] POLY       = lbist_pkg::TPG_LFSR_POLY,
  parameter int unsigned      NUM_CHAINS = 9,
  parameter int unsigned      N_MAX      = 2,
  parameter int unsigned      TAP_STRIDE = 1
) (
  input  logic [WIDTH-1:0]                        lfsr_state,
  output logic [NUM_CHAINS-1:0][N_MAX:0]          t
);

  // Mask of present stages whose XOR is stage `tap` after `k` steps.
  function automatic logic [WIDTH-1:0] future_mask(input int unsigned tap,
                                                   input int unsigned k);
    logic [WIDTH-1:0] m;
    logic [31:0]      v;
    m = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      v = 32'd1 << i;
      for (int unsigned s = 0; s < k; s++)
        v = lbist_pkg::galois_step(v, 32'(POLY), WIDTH);
      m[i] = v[tap];
    end
    return m;
  endfunction

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    for (genvar k = 0; k <= N_MAX; k++) begin : g_fut
      localparam logic [WIDTH-1:0] MASK = future_mask((c * TAP_STRIDE) % WIDTH, k);
      assign t[c][k] = ^(lfsr_state & MASK);
    end
  end

endmodule
