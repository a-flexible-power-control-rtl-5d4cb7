// tb_switch_timing_ctrl: self-checking test of the switch-timing controller.
// Four chains of 40 bits, (alpha, beta, gamma) = (12, 10, 18). For every
// approach and filter order 1 and 2 it runs several patterns and compares
// the control signals of every chain in every shift cycle with a reference
// that places head, middle and tail itself: Basic (same split everywhere),
// Swap (odd/even chains exchange head and tail, alternating per pattern),
// Moving (head grows by one per pattern and restarts at E_n when the tail
// would fall below E_n = 2^(n+2)-2) and Fixed (filter everywhere).
// It counts how often swapped chains and moving restarts occurred.
module tb_switch_timing_ctrl;
  import lbist_pkg::*;
  localparam int NC = 4, L = 40, NMAX = 2, LW = $clog2(L + 1);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b1, init = 1'b0, next_pattern = 1'b0;
  approach_e approach;
  logic [1:0]    plpf_n;
  logic [LW-1:0] alpha, beta, gamma, shift_idx, mov_head;
  logic [NC-1:0][NMAX:1] ctrl;
  logic swap_phase, mov_wrap;
  int checks = 0, failures = 0, n_swapped = 0, n_wraps = 0, n_mid = 0;

  switch_timing_ctrl #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .N_MAX(NMAX)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int head_ref, emin, nsel;
    logic [NMAX:1] exp_ctrl;
    approach = APPR_BASIC; plpf_n = 2'd2;
    alpha = 12; beta = 10; gamma = 18; shift_idx = '0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int n = 1; n <= 2; n++) begin
      for (int a = 0; a < 4; a++) begin
        approach = approach_e'(a);
        plpf_n   = 2'(n);
        emin     = (1 << (n + 2)) - 2;
        @(negedge clk) init = 1'b1;
        @(negedge clk) init = 1'b0;
        head_ref = int'(gamma);
        for (int p = 0; p < 14; p++) begin
          for (int t = 0; t < L; t++) begin
            shift_idx = LW'(t);
            #1;
            for (int c = 0; c < NC; c++) begin
              int h;
              bit mid;
              case (approach)
                APPR_SWAP:   h = ((c % 2) != (p % 2)) ? int'(alpha) : int'(gamma);
                APPR_MOVING: h = head_ref;
                default:     h = int'(gamma);
              endcase
              if (approach == APPR_SWAP && h != int'(gamma) && t == 0) n_swapped++;
              mid  = (approach != APPR_FIXED) && t >= h && t < h + int'(beta);
              nsel = mid ? 0 : n;
              n_mid += int'(mid);
              for (int k = 1; k <= NMAX; k++) exp_ctrl[k] = (k > nsel);
              checks++;
              if (ctrl[c] !== exp_ctrl) begin
                failures++;
                if (failures < 20)
                  $display("FAIL appr=%0d n=%0d p=%0d t=%0d c=%0d ctrl=%b exp=%b",
                           a, n, p, t, c, ctrl[c], exp_ctrl);
              end
            end
            @(negedge clk);
          end
          // capture: advance to the next pattern
          if (approach == APPR_MOVING) begin
            checks++;
            if (mov_head !== LW'(head_ref)) begin
              failures++;
              $display("FAIL moving head %0d, expected %0d", mov_head, head_ref);
            end
            if (head_ref + 1 > L - int'(beta) - emin) begin
              head_ref = emin;
              n_wraps++;
              checks++;
              if (!mov_wrap) begin failures++; $display("FAIL mov_wrap not raised"); end
            end else begin
              head_ref = head_ref + 1;
            end
          end
          next_pattern = 1'b1;
          @(negedge clk) next_pattern = 1'b0;
        end
      end
    end
    $display("swapped chain-patterns=%0d moving restarts=%0d middle-cycles=%0d",
             n_swapped, n_wraps, n_mid);
    checks++; if (n_swapped == 0) begin failures++; $display("FAIL no swap seen"); end
    checks++; if (n_wraps == 0)   begin failures++; $display("FAIL no moving restart seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
