// tb_lbist_power_ctrl_top: end-to-end test of the power-controlled BIST
// pattern generator.
// Nine chains of 40 flip-flops, 12 tests per run. The testbench keeps its
// own model of the 16-bit LFSR (stepped one shift at a time), of the
// phase-shifter taps (chain c reads stage c; future bits are the same stage
// k steps later), of the filter decision and of the head/middle/tail
// placement, and compares every scan-in bit of every chain with it. The
// logic under test is replaced by random capture data, so the first shift
// of each test filters against a captured value. Runs: Fixed order 2,
// Basic order 2 and order 1, Swap, Moving. It also checks the primary-input
// LFSR, the run length, and the weighted scan-in transition metric (WTM)
// against the value the part lengths predict, and counts each mechanism.
module tb_lbist_power_ctrl_top;
  import lbist_pkg::*;
  localparam int NC = 9, L = 40, P = 12, LW = $clog2(L + 1), PW = $clog2(P + 1);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b1, start = 1'b0;
  approach_e approach;
  logic [1:0] plpf_n;
  logic [LW-1:0] alpha, beta, gamma, shift_idx, mov_head;
  logic [NC-1:0][L-1:0] capture_d, scan_q;
  logic [15:0] pi_pattern;
  logic [NC-1:0] scan_in, scan_out;
  logic scan_en, capture, swap_phase, mov_wrap, busy, done;
  logic [PW-1:0] pattern_idx;

  lbist_power_ctrl_top #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .NUM_PATTERNS(P)) dut (.*);

  int checks = 0, failures = 0;
  int n_psf_bits = 0, n_filt_bits = 0, n_filt_toggles = 0, n_captures = 0;
  int n_swapped = 0, n_restarts = 0, n_order1 = 0, n_runs[4] = '{0, 0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] step16(input logic [15:0] s);
    return {s[14:0], 1'b0} ^ (s[15] ? 16'hA011 : 16'h0000);
  endfunction

  // Predicted WTM_in [%] of a split, weight of bit position i = i
  function automatic real wtm_pred(input int a, input int b, input int g, input real low);
    real num, den;
    num = 0.0; den = 0.0;
    for (int i = 1; i <= a + b + g; i++) begin
      den += i;
      num += i * ((i > a && i <= a + b) ? 0.5 : low);
    end
    return 100.0 * num / den;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_bist(input approach_e a, input int n, input int al, input int be, input int ga);
    logic [15:0] ref_lfsr, ref_pi, fut;
    logic [NC-1:0] ref_first, prev_bit;
    int head_mov, emin, cycles;
    real wtm_sum, wtm_exp, low;
    approach = a; plpf_n = 2'(n);
    alpha = LW'(al); beta = LW'(be); gamma = LW'(ga);
    ref_lfsr = 16'hAAAA; ref_pi = 16'h5555;
    emin = (1 << (n + 2)) - 2;
    head_mov = ga;
    wtm_sum = 0.0;
    ref_first = '0;
    for (int c = 0; c < NC; c++) ref_first[c] = scan_q[c][0];
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    for (int p = 0; p < P; p++) begin
      int wsum[NC];
      for (int c = 0; c < NC; c++) wsum[c] = 0;
      check(pi_pattern == ref_pi, "primary-input LFSR");
      for (int t = 0; t < L; t++) begin
        check(scan_en && shift_idx == LW'(t), "shift cycle");
        for (int c = 0; c < NC; c++) begin
          int h, nsel;
          bit mid, all_differ;
          logic [2:0] tt;
          logic exp_bit;
          case (a)
            APPR_SWAP:   h = ((c % 2) != (p % 2)) ? al : ga;
            APPR_MOVING: h = head_mov;
            default:     h = ga;
          endcase
          if (a == APPR_SWAP && h != ga && t == 0) n_swapped++;
          mid  = (a != APPR_FIXED) && t >= h && t < h + be;
          nsel = mid ? 0 : n;
          fut = ref_lfsr;
          for (int k = 0; k <= 2; k++) begin
            tt[k] = fut[c];
            fut = step16(fut);
          end
          all_differ = 1'b1;
          for (int k = 0; k <= nsel; k++) if (tt[k] == ref_first[c]) all_differ = 1'b0;
          exp_bit = all_differ ? ~ref_first[c] : ref_first[c];
          check(scan_in[c] == exp_bit,
                $sformatf("scan-in appr=%0d n=%0d test=%0d shift=%0d chain=%0d", a, n, p, t, c));
          if (mid) n_psf_bits++;
          else begin
            n_filt_bits++;
            if (n == 1) n_order1++;
            if (exp_bit != ref_first[c]) n_filt_toggles++;
          end
          if (t > 0 && exp_bit != prev_bit[c]) wsum[c] += L - t;
          prev_bit[c]  = exp_bit;
          ref_first[c] = exp_bit;
        end
        ref_lfsr = step16(ref_lfsr);
        @(negedge clk); cycles++;
      end
      check(capture, "capture cycle");
      for (int c = 0; c < NC; c++) wtm_sum += 100.0 * wsum[c] / (L * (L - 1) / 2);
      n_captures++;
      if (a == APPR_MOVING) begin
        check(mov_head == LW'(head_mov), "moving head length");
        if (head_mov + 1 > L - be - emin) begin head_mov = emin; n_restarts++; end
        else head_mov++;
      end
      capture_d = (NC * L)'({$urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      for (int c = 0; c < NC; c++) ref_first[c] = capture_d[c][0];
      ref_pi = step16(ref_pi);
      @(negedge clk); cycles++;
    end
    check(done, "done after the last test");
    check(cycles == P * (L + 1) + 1, $sformatf("run length %0d clocks", cycles));
    low  = (n == 1) ? 100.0 / 6.0 : 100.0 / 14.0;
    wtm_exp = (a == APPR_FIXED) ? low : wtm_pred(al, be, ga, low / 100.0);
    $display("approach %0d order %0d: WTM_in measured %f%%, split predicts %f%%",
             a, n, wtm_sum / (P * NC), wtm_exp);
    check(wtm_sum / (P * NC) > wtm_exp - 6.0 && wtm_sum / (P * NC) < wtm_exp + 6.0, "WTM_in near prediction");
    n_runs[a]++;
  endtask

  initial begin
    capture_d = '0;
    approach = APPR_FIXED; plpf_n = 2'd2; alpha = '0; beta = '0; gamma = '0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    run_bist(APPR_FIXED,  2, 16, 10, 14);
    run_bist(APPR_BASIC,  2, 16, 10, 14);
    run_bist(APPR_BASIC,  1, 16, 10, 14);
    run_bist(APPR_SWAP,   2, 16, 10, 14);
    run_bist(APPR_MOVING, 2, 16, 10, 14);
    $display("raw PSF bits=%0d filtered bits=%0d filter toggles=%0d order-1 bits=%0d captures=%0d swapped=%0d restarts=%0d",
             n_psf_bits, n_filt_bits, n_filt_toggles, n_order1, n_captures, n_swapped, n_restarts);
    check(n_psf_bits > 0,     "raw PSF (order 0) bits occurred");
    check(n_filt_bits > 0,    "filtered bits occurred");
    check(n_filt_toggles > 0, "filter output toggles occurred");
    check(n_order1 > 0,       "order-1 filtering occurred");
    check(n_captures > 0,     "captures occurred");
    check(n_swapped > 0,      "swap of head and tail occurred");
    check(n_restarts > 0,     "moving restart occurred");
    for (int a = 0; a < 4; a++) check(n_runs[a] > 0, $sformatf("approach %0d run", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
