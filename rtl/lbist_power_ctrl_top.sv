// lbist_power_ctrl_top: scan-based logic BIST pattern generator whose
// scan-in toggle rate can be set to a chosen level.
//
// Data path: the TPG LFSR drives the phase shifter for filter (PSF), which
// gives every chain its current bit T_j and future bits T_j+1..T_j+N_MAX.
// One power control cell per chain turns these into the scan-in bit: raw
// T_j (toggle rate 50 %) or the low-pass-filtered value of order n (16.7 %
// for n = 1, 7.1 % for n = 2), using the chain's first flip-flop as the past
// bit. The switch-timing controller changes the filter order inside every
// scan-in sequence (filtered head, raw middle, filtered tail) so that the
// weighted scan-in power lands on a target set by (alpha, beta, gamma).
// The sequencer runs NUM_PATTERNS tests of CHAIN_LEN shifts and one capture
// each; a second LFSR supplies the primary inputs and advances once per
// test. The combinational logic of the circuit under test is outside: its
// stimulus is scan_q and pi_pattern and its response comes back on capture_d.
//
// Interface: set approach, plpf_n and alpha/beta/gamma (alpha+beta+gamma =
// CHAIN_LEN), hold them stable and pulse start; done rises after
// NUM_PATTERNS*(CHAIN_LEN+1)+1 clocks. scan_in shows the bits being shifted
// in this cycle. Defaults: 9 chains of 92 flip-flops (the b22 benchmark
// setup), 16-bit LFSR x^16+x^15+x^13+x^4+1 with seed 1010...1010, filter up
// to n = 2, 30 000 tests. The primary-input LFSR seed and width are this
// design's own choice.
module lbist_power_ctrl_top #(
  parameter int unsigned NUM_CHAINS   = 9,
  parameter int unsigned CHAIN_LEN    = 92,
  parameter int unsigned N_MAX        = 2,
  parameter int unsigned NUM_PATTERNS = 30000,
  parameter int unsigned TAP_STRIDE   = 1,
  parameter int unsigned PI_W         = 16,
  parameter logic [PI_W-1:0] PI_POLY  = PI_W'(lbist_pkg::TPG_LFSR_POLY),
  parameter logic [PI_W-1:0] PI_SEED  = PI_W'(16'h5555),
  parameter int unsigned LEN_W        = $clog2(CHAIN_LEN + 1),
  parameter int unsigned PAT_W        = $clog2(NUM_PATTERNS + 1),
  parameter int unsigned NSEL_W       = $clog2(N_MAX + 1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  lbist_pkg::approach_e                 approach,
  input  logic [NSEL_W-1:0]                    plpf_n,
  input  logic [LEN_W-1:0]                     alpha,
  input  logic [LEN_W-1:0]                     beta,
  input  logic [LEN_W-1:0]                     gamma,
  input  logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] capture_d,
  output logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] scan_q,
  output logic [PI_W-1:0]                      pi_pattern,
  output logic [NUM_CHAINS-1:0]                scan_in,
  output logic [NUM_CHAINS-1:0]                scan_out,
  output logic                                 scan_en,
  output logic                                 capture,
  output logic [LEN_W-1:0]                     shift_idx,
  output logic [PAT_W-1:0]                     pattern_idx,
  output logic                                 swap_phase,
  output logic [LEN_W-1:0]                     mov_head,
  output logic                                 mov_wrap,
  output logic                                 busy,
  output logic                                 done
);

  import lbist_pkg::*;

  logic                                init;
  logic [TPG_LFSR_W-1:0]               tpg_state;
  logic [NUM_CHAINS-1:0][N_MAX:0]      t;
  logic [NUM_CHAINS-1:0][N_MAX:1]      ctrl;
  logic [NUM_CHAINS-1:0]               first_ff;

  bist_sequencer #(
    .CHAIN_LEN (CHAIN_LEN), .NUM_PATTERNS (NUM_PATTERNS),
    .LEN_W (LEN_W), .PAT_W (PAT_W)
  ) u_seq (
    .clk, .rst_n, .start, .init, .scan_en, .capture,
    .shift_idx, .pattern_idx, .busy, .done
  );

  lfsr #(
    .WIDTH (TPG_LFSR_W), .POLY (TPG_LFSR_POLY), .SEED (TPG_LFSR_SEED)
  ) u_tpg_lfsr (
    .clk, .rst_n, .init, .en (scan_en), .state (tpg_state)
  );

  lfsr #(
    .WIDTH (PI_W), .POLY (PI_POLY), .SEED (PI_SEED)
  ) u_pi_lfsr (
    .clk, .rst_n, .init, .en (capture), .state (pi_pattern)
  );

  psf #(
    .WIDTH (TPG_LFSR_W), .POLY (TPG_LFSR_POLY), .NUM_CHAINS (NUM_CHAINS),
    .N_MAX (N_MAX), .TAP_STRIDE (TAP_STRIDE)
  ) u_psf (
    .lfsr_state (tpg_state), .t (t)
  );

  switch_timing_ctrl #(
    .NUM_CHAINS (NUM_CHAINS), .CHAIN_LEN (CHAIN_LEN), .N_MAX (N_MAX),
    .LEN_W (LEN_W), .NSEL_W (NSEL_W)
  ) u_timing (
    .clk, .rst_n, .init, .next_pattern (capture), .approach, .plpf_n,
    .alpha, .beta, .gamma, .shift_idx, .ctrl, .swap_phase, .mov_head, .mov_wrap
  );

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_cell
    power_ctrl_cell #(.N_MAX (N_MAX)) u_cell (
      .t (t[c]), .ctrl (ctrl[c]), .s_prev (first_ff[c]), .scan_in (scan_in[c])
    );
  end

  scan_chains #(
    .NUM_CHAINS (NUM_CHAINS), .CHAIN_LEN (CHAIN_LEN)
  ) u_chains (
    .clk, .rst_n, .scan_en, .capture, .scan_in, .capture_d,
    .q (scan_q), .first_ff, .scan_out
  );

  a_split: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> 32'(alpha) + 32'(beta) + 32'(gamma) == CHAIN_LEN);

endmodule
