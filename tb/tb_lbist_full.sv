// tb_lbist_full: one complete BIST run of the generator at its default size:
// 9 chains of 92 flip-flops, 30 000 tests, filter order 2, Basic control
// with the b22 split (alpha, beta, gamma) = (39, 13, 40), whose target
// scan-in power is 13.12 % WTM_in. Every scan-in bit is compared with an
// independent model (LFSR, phase-shifter taps, filter, part placement); the
// average WTM_in over the run must lie within 0.5 % of the target and the
// run must take 30 000 * 93 + 1 clocks. Random data stands in for the
// captured responses.
module tb_lbist_full;
  import lbist_pkg::*;
  localparam int NC = 9, L = 92, P = 30000, LW = $clog2(L + 1), PW = $clog2(P + 1);
  localparam int AL = 39, BE = 13, GA = 40;
  localparam real TARGET = 13.12;
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

  lbist_power_ctrl_top dut (.*);

  int checks = 0, failures = 0, mism = 0;

  function automatic logic [15:0] step16(input logic [15:0] s);
    return {s[14:0], 1'b0} ^ (s[15] ? 16'hA011 : 16'h0000);
  endfunction

  initial begin : watchdog
    repeat (P * (L + 1) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ref_lfsr, fut;
    logic [NC-1:0] ref_first, prev_bit;
    int cycles;
    longint wsum;
    real wtm;
    capture_d = '0;
    approach = APPR_BASIC; plpf_n = 2'd2;
    alpha = LW'(AL); beta = LW'(BE); gamma = LW'(GA);
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    ref_lfsr = 16'hAAAA; ref_first = '0; wsum = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    for (int p = 0; p < P; p++) begin
      for (int t = 0; t < L; t++) begin
        bit mid;
        mid = (t >= GA) && (t < GA + BE);
        for (int c = 0; c < NC; c++) begin
          logic exp_bit;
          bit all_differ;
          fut = ref_lfsr;
          all_differ = 1'b1;
          for (int k = 0; k <= (mid ? 0 : 2); k++) begin
            if (fut[c] == ref_first[c]) all_differ = 1'b0;
            fut = step16(fut);
          end
          exp_bit = all_differ ? ~ref_first[c] : ref_first[c];
          if (scan_in[c] != exp_bit) mism++;
          if (t > 0 && exp_bit != prev_bit[c]) wsum += longint'(L) - longint'(t);
          prev_bit[c] = exp_bit;
          ref_first[c] = exp_bit;
        end
        ref_lfsr = step16(ref_lfsr);
        @(negedge clk); cycles++;
      end
      capture_d = (NC * L)'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom});
      #1;
      for (int c = 0; c < NC; c++) ref_first[c] = capture_d[c][0];
      checks++;
      if (!capture) failures++;
      @(negedge clk); cycles++;
    end
    checks++;
    if (mism != 0) begin failures++; $display("FAIL %0d scan-in bits differ from the model", mism); end
    checks++;
    if (!done || cycles != P * (L + 1) + 1) begin
      failures++; $display("FAIL run length %0d, done=%b", cycles, done);
    end
    wtm = 100.0 * real'(wsum) / (real'(P) * NC * (L * (L - 1) / 2));
    $display("WTM_in over %0d tests: %f%% (target %f%%)", P, wtm, TARGET);
    checks++;
    if (wtm < TARGET - 0.5 || wtm > TARGET + 0.5) begin failures++; $display("FAIL WTM_in off target"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
