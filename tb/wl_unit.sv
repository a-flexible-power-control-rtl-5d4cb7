// wl_unit: testbench helper that runs one benchmark's scan configuration
// through the generator. It builds a generator with the benchmark's chain
// length, runs the unfiltered LFSR and single filters of order 1 and 2
// (Fixed mode), then Basic, Swap and Moving control with the benchmark's
// (alpha, beta, gamma), for P tests each, measures the average weighted
// scan-in transition metric WTM_in (transition entering at shift t weighs
// L - t, normalised by L(L-1)/2) over all chains and tests, and checks it
// against the expected value (50 %, the benchmark's single-filter values,
// then its control target) within TOL percentage points.
// finished rises when all six runs are over; checks and failures are
// the running counts.
module wl_unit #(
  parameter string       NAME   = "s9234",
  parameter int unsigned L      = 76,
  parameter int unsigned NMAX   = 2,
  parameter int unsigned B_AL = 28, B_BE = 19, B_GA = 29,
  parameter int unsigned S_AL = 38, S_BE = 19, S_GA = 19,
  parameter int unsigned M_AL = 38, M_BE = 19, M_GA = 19,
  parameter real         TARGET = 17.81,
  parameter real         T2_N1  = 16.72,   // single order-1 filter, WTM_in [%]
  parameter real         T2_N2  = 7.18,    // single order-2 filter, WTM_in [%]
  parameter real         TOL    = 0.6,
  parameter int unsigned P      = 3000
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  import lbist_pkg::*;
  localparam int NC = 9, LW = $clog2(L + 1), PW = $clog2(P + 1), NW = $clog2(NMAX + 1);
  logic rst_n = 1'b1, start = 1'b0;
  approach_e approach;
  logic [NW-1:0] plpf_n;
  logic [LW-1:0] alpha, beta, gamma, shift_idx, mov_head;
  logic [NC-1:0][L-1:0] capture_d, scan_q;
  logic [15:0] pi_pattern;
  logic [NC-1:0] scan_in, scan_out, prev_bit;
  logic scan_en, capture, swap_phase, mov_wrap, busy, done;
  logic [PW-1:0] pattern_idx;

  lbist_power_ctrl_top #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .N_MAX(NMAX), .NUM_PATTERNS(P)) dut (.*);

  longint wsum;
  always @(posedge clk) begin
    if (scan_en) begin
      for (int c = 0; c < NC; c++)
        if (shift_idx != 0 && scan_in[c] != prev_bit[c]) wsum = wsum + longint'(L) - longint'(shift_idx);
      prev_bit = scan_in;
    end
  end

  task automatic run(input approach_e a, input int n, input int al, input int be, input int ga,
                     input real target);
    real wtm;
    approach = a; plpf_n = NW'(n); alpha = LW'(al); beta = LW'(be); gamma = LW'(ga);
    wsum = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      capture_d = (NC * L)'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom});
      @(negedge clk);
    end
    wtm = 100.0 * real'(wsum) / (real'(P) * NC * (L * (L - 1) / 2));
    $display("%s L=%0d n=%0d approach %0d (%0d,%0d,%0d): WTM_in %6.2f%%  target %6.2f%%  diff %5.2f",
             NAME, L, n, a, al, be, ga, wtm, target, wtm - target);
    checks++;
    if (wtm < target - TOL || wtm > target + TOL) begin
      failures++;
      $display("FAIL %s approach %0d off target", NAME, a);
    end
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    approach = APPR_BASIC; plpf_n = NW'(NMAX);
    alpha = '0; beta = '0; gamma = '0; capture_d = '0; prev_bit = '0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    run(APPR_FIXED,  0,    0,    L,    0,    50.0);
    run(APPR_FIXED,  1,    L,    0,    0,    T2_N1);
    run(APPR_FIXED,  2,    L,    0,    0,    T2_N2);
    run(APPR_BASIC,  NMAX, B_AL, B_BE, B_GA, TARGET);
    run(APPR_SWAP,   NMAX, S_AL, S_BE, S_GA, TARGET);
    run(APPR_MOVING, NMAX, M_AL, M_BE, M_GA, TARGET);
    finished = 1'b1;
  end
endmodule
