// tb_bist_sequencer: self-checking test of the shift/capture sequencer.
// Chains of 5 bits, 4 tests. After start each test must be exactly five
// shift cycles numbered 0..4 followed by one capture cycle, pattern_idx must
// count captured tests, and done must rise NUM_PATTERNS*(CHAIN_LEN+1) clocks
// after the start clock. A second run started from DONE must behave alike.
module tb_bist_sequencer;
  localparam int L = 5, P = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b1, start = 1'b0;
  logic init, scan_en, capture, busy, done;
  logic [$clog2(L+1)-1:0] shift_idx;
  logic [$clog2(P+1)-1:0] pattern_idx;
  int checks = 0, failures = 0;

  bist_sequencer #(.CHAIN_LEN(L), .NUM_PATTERNS(P)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !scan_en && !capture, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      int cycles;
      start = 1'b1;
      #1 check(init, "init pulses with start");
      @(negedge clk) start = 1'b0;
      cycles = 1;
      for (int p = 0; p < P; p++) begin
        for (int t = 0; t < L; t++) begin
          check(scan_en && !capture && int'(shift_idx) == t && !init, $sformatf("shift %0d of test %0d", t, p));
          check(int'(pattern_idx) == p, "pattern index during shift");
          @(negedge clk); cycles++;
        end
        check(capture && !scan_en, $sformatf("capture of test %0d", p));
        @(negedge clk); cycles++;
      end
      check(done && !busy, "done after last capture");
      check(cycles == P * (L + 1) + 1, $sformatf("run length %0d clocks", cycles));
      check(int'(pattern_idx) == P, "pattern count");
      repeat (3) @(negedge clk);
      check(done && !scan_en, "stays done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
