// tb_psf: self-checking test of the phase shifter for filter.
// Part 1: a 4-bit internal LFSR (x^4 + x + 1) with four chains must give,
// for every state, the table of the 4-bit example: chain 1 FF1/FF4/FF3,
// chain 2 FF2/FF1^FF4/FF3^FF4, chain 3 FF3/FF2/FF1^FF4, chain 4 FF4/FF3/FF2.
// Part 2: for the default 16-bit LFSR, T_j+k of each chain must equal T_j
// seen k LFSR steps later (stepped here by an independent model).
module tb_psf;
  int checks = 0, failures = 0;

  logic [3:0]       s4;
  logic [3:0][2:0]  t4;
  psf #(.WIDTH(4), .POLY(4'b0011), .NUM_CHAINS(4), .N_MAX(2)) dut4 (.lfsr_state(s4), .t(t4));

  logic [15:0]      s16;
  logic [8:0][2:0]  t16;
  psf dut16 (.lfsr_state(s16), .t(t16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] step16(input logic [15:0] s);
    return {s[14:0], 1'b0} ^ (s[15] ? 16'hA011 : 16'h0000);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ff1, ff2, ff3, ff4;
    logic [15:0] fut [0:2];
    for (int v = 0; v < 16; v++) begin
      s4 = 4'(v);
      #1;
      {ff4, ff3, ff2, ff1} = s4;
      check(t4[0] == {ff3, ff4, ff1},             "SC1 row");
      check(t4[1] == {ff3 ^ ff4, ff1 ^ ff4, ff2}, "SC2 row");
      check(t4[2] == {ff1 ^ ff4, ff2, ff3},       "SC3 row");
      check(t4[3] == {ff2, ff3, ff4},             "SC4 row");
    end
    s16 = 16'hAAAA;
    for (int n = 0; n < 500; n++) begin
      fut[0] = s16;
      fut[1] = step16(fut[0]);
      fut[2] = step16(fut[1]);
      #1;
      for (int c = 0; c < 9; c++)
        for (int k = 0; k < 3; k++)
          check(t16[c][k] == fut[k][c], $sformatf("16-bit chain %0d future %0d", c, k));
      s16 = (n % 7 == 3) ? 16'($urandom) : step16(s16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
