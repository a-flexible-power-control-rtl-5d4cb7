// switch_timing_ctrl: chooses, shift by shift, which generator feeds each
// scan chain, and drives the PLPF control signals of every power control cell.
//
// A scan-in sequence of CHAIN_LEN bits is split into three parts in shift
// order: the head (gamma bits, shifted first, deepest in the chain), the
// middle (beta bits) and the tail (alpha bits, shifted last). Head and tail
// are filtered with order plpf_n; the middle is raw PSF data (order 0).
// The approaches differ in how the head length is chosen per chain and per
// pattern:
//   FIXED  : the whole sequence is filtered with order plpf_n.
//   BASIC  : head = gamma for every chain and pattern.
//   SWAP   : chains whose 0-based index parity differs from the pattern
//            parity use (gamma, beta, alpha) in place of (alpha, beta, gamma),
//            so odd and even chains exchange head and tail each pattern.
//   MOVING : the head starts at gamma and grows by one bit per pattern, so
//            the middle part slides along the chain. When the tail would drop
//            below E_n = 2^(n+2)-2 bits the head restarts at E_n.
//
// Interface: init (one clock, at the start of a BIST run) resets the pattern
// parity and loads the moving head length from gamma; next_pattern (one
// clock, at each capture) advances both. shift_idx is the 0-based number of
// the current shift in the pattern. ctrl[c][k] = 1 switches future bit
// T_j+k of chain c off; it is combinational from shift_idx and the state.
// The split into parts, the part order and the three approaches follow the
// reference; the parity convention, the restart point of the moving head and
// the FIXED mode are this design's own choices.
module switch_timing_ctrl #(
  parameter int unsigned NUM_CHAINS = 9,
  parameter int unsigned CHAIN_LEN  = 92,
  parameter int unsigned N_MAX      = 2,
  parameter int unsigned LEN_W      = $clog2(CHAIN_LEN + 1),
  parameter int unsigned NSEL_W     = $clog2(N_MAX + 1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 init,
  input  logic                                 next_pattern,
  input  lbist_pkg::approach_e                 approach,
  input  logic [NSEL_W-1:0]                    plpf_n,     // filter order of head and tail
  input  logic [LEN_W-1:0]                     alpha,      // tail length
  input  logic [LEN_W-1:0]                     beta,       // middle length
  input  logic [LEN_W-1:0]                     gamma,      // head length
  input  logic [LEN_W-1:0]                     shift_idx,
  output logic [NUM_CHAINS-1:0][N_MAX:1]       ctrl,
  output logic                                 swap_phase, // pattern parity (SWAP)
  output logic [LEN_W-1:0]                     mov_head,   // current head length (MOVING)
  output logic                                 mov_wrap    // MOVING head restarts at next_pattern
);

  import lbist_pkg::*;

  logic [LEN_W+1:0] e_min;       // E_n for the configured order
  logic [LEN_W+1:0] head_max;    // last head length that leaves a tail of E_n

  always_comb begin
    e_min    = (LEN_W+2)'(min_part_len(32'(plpf_n)));
    head_max = (LEN_W+2)'(CHAIN_LEN) - (LEN_W+2)'(beta) - e_min;
    mov_wrap = ((LEN_W+2)'(mov_head) + 1'b1 > head_max) ||
               ((LEN_W+2)'(CHAIN_LEN) < (LEN_W+2)'(beta) + e_min);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      swap_phase <= 1'b0;
      mov_head   <= '0;
    end else if (init) begin
      swap_phase <= 1'b0;
      mov_head   <= gamma;
    end else if (next_pattern) begin
      swap_phase <= ~swap_phase;
      mov_head   <= mov_wrap ? LEN_W'(e_min) : mov_head + 1'b1;
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < NUM_CHAINS; c++) begin
      logic [LEN_W:0]    head;
      logic              in_mid;
      logic [NSEL_W-1:0] nsel;
      unique case (approach)
        APPR_SWAP:   head = (LEN_W+1)'((c[0] ^ swap_phase) ? alpha : gamma);
        APPR_MOVING: head = (LEN_W+1)'(mov_head);
        default:     head = (LEN_W+1)'(gamma);
      endcase
      in_mid = (approach != APPR_FIXED) &&
               ((LEN_W+1)'(shift_idx) >= head) &&
               ((LEN_W+1)'(shift_idx) <  head + (LEN_W+1)'(beta));
      nsel = in_mid ? '0 : plpf_n;
      for (int unsigned k = 1; k <= N_MAX; k++)
        ctrl[c][k] = (k > 32'(nsel));
    end
  end

endmodule
