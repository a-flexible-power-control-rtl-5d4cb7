// tb_pi_lfsr: self-checking test of the primary-input pattern LFSR, the
// same LFSR circuit built with seed 16'h5555 and advanced once per test.
// Checks the seed after reset and after init, that the state holds between
// steps, every step against the written-out polynomial equations, and the
// maximal period 2^16 - 1.
module tb_pi_lfsr;
  logic        clk = 1'b0;
  logic        rst_n = 1'b1, init = 1'b0, en = 1'b0;
  logic [15:0] state;
  int          checks = 0, failures = 0;

  lfsr #(.WIDTH(16), .POLY(16'hA011), .SEED(16'h5555)) dut (.clk, .rst_n, .init, .en, .state);

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
    if (!ok) begin failures++; $display("FAIL %s (state=%h)", what, state); end
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
    int period;
    #1 rst_n = 1'b0;
    #1 check(state == 16'h5555, "reset seed");
    rst_n = 1'b1;
    expect_s = 16'h5555;
    for (int i = 0; i < 400; i++) begin
      en = (i % 3 == 0);
      @(negedge clk);
      if (en) expect_s = ref_step(expect_s);
      check(state == expect_s, "step or hold");
    end
    init = 1'b1; en = 1'b1;
    @(negedge clk);
    init = 1'b0;
    check(state == 16'h5555, "init reload");
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (state != 16'h5555 && period < 70000);
    check(period == 65535, "maximal period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
