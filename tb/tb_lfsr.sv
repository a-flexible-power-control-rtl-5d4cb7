// tb_lfsr: self-checking test of the TPG LFSR.
// Checks the reset seed 16'hAAAA, every step against the written-out
// equations of x^16+x^15+x^13+x^4+1 in internal form, that en = 0 holds the
// state, that init reloads the seed, and that the period is 2^16 - 1.
module tb_lfsr;
  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        init = 1'b0;
  logic        en = 1'b0;
  logic [15:0] state;
  int          checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .init, .en, .state);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_step(input logic [15:0] s);
    logic [15:0] n;
    for (int i = 1; i < 16; i++) n[i] = s[i-1];
    n[0]  = s[15];
    n[4]  = s[3]  ^ s[15];
    n[13] = s[12] ^ s[15];
    n[15] = s[14] ^ s[15];
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (state=%h)", what, state);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expect_s;
    int          period;
    #1 rst_n = 1'b0;
    #1;
    check(state == 16'hAAAA, "reset seed");
    @(negedge clk) rst_n = 1'b1;
    // hold
    @(negedge clk);
    check(state == 16'hAAAA, "hold without en");
    // step and compare
    en = 1'b1;
    expect_s = 16'hAAAA;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      expect_s = ref_step(expect_s);
      check(state == expect_s, "step");
    end
    // init wins over en
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    check(state == 16'hAAAA, "init reload");
    // period
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (state != 16'hAAAA && period < 70000);
    check(period == 65535, "maximal period");
    $display("period = %0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
