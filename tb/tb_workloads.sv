// tb_workloads: scan-in power control for the ten benchmark scan
// configurations of the reference evaluation. Each row gives the chain
// length, the filter order of the low-power parts (3 for b15, 2 otherwise),
// the (alpha, beta, gamma) splits of Basic, Swap and Moving control and the
// target WTM_in, plus the WTM_in of a single order-1 and order-2 filter.
// Every configuration is first run unfiltered and with each single filter,
// then with each control approach, with 9 chains for 3000 tests per run;
// the measured WTM_in must lie within 0.6 percentage points of the
// expected value (Moving control moves the unfiltered part along the chain, so its
// value is an average over head positions).
module tb_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  localparam int NU = 10;
  logic [NU-1:0] fin;
  int ch [NU];
  int fl [NU];

  wl_unit #(.NAME("s9234"), .T2_N1(16.72), .T2_N2(7.18),  .L(76),  .NMAX(2), .B_AL(28), .B_BE(19), .B_GA(29),
            .S_AL(38), .S_BE(19), .S_GA(19), .M_AL(38), .M_BE(19), .M_GA(19), .TARGET(17.81))
    u0 (.clk, .finished(fin[0]), .checks(ch[0]), .failures(fl[0]));
  wl_unit #(.NAME("s13207"), .T2_N1(16.96), .T2_N2(7.49), .L(96),  .NMAX(2), .B_AL(26), .B_BE(43), .B_GA(27),
            .S_AL(14), .S_BE(43), .S_GA(39), .M_AL(14), .M_BE(43), .M_GA(39), .TARGET(26.32))
    u1 (.clk, .finished(fin[1]), .checks(ch[1]), .failures(fl[1]));
  wl_unit #(.NAME("s15850"), .T2_N1(17.01), .T2_N2(7.51), .L(100), .NMAX(2), .B_AL(36), .B_BE(28), .B_GA(36),
            .S_AL(50), .S_BE(28), .S_GA(22), .M_AL(50), .M_BE(28), .M_GA(22), .TARGET(19.03))
    u2 (.clk, .finished(fin[2]), .checks(ch[2]), .failures(fl[2]));
  wl_unit #(.NAME("s38417"), .T2_N1(16.78), .T2_N2(7.26), .L(182), .NMAX(2), .B_AL(69), .B_BE(44), .B_GA(69),
            .S_AL(91), .S_BE(44), .S_GA(47), .M_AL(91), .M_BE(44), .M_GA(47), .TARGET(17.63))
    u3 (.clk, .finished(fin[3]), .checks(ch[3]), .failures(fl[3]));
  wl_unit #(.NAME("s38584"), .T2_N1(16.84), .T2_N2(7.32), .L(97),  .NMAX(2), .B_AL(25), .B_BE(46), .B_GA(26),
            .S_AL(14), .S_BE(46), .S_GA(37), .M_AL(14), .M_BE(46), .M_GA(37), .TARGET(27.53))
    u4 (.clk, .finished(fin[4]), .checks(ch[4]), .failures(fl[4]));
  wl_unit #(.NAME("b14"), .T2_N1(16.97), .T2_N2(7.51),    .L(82),  .NMAX(2), .B_AL(35), .B_BE(11), .B_GA(36),
            .S_AL(41), .S_BE(11), .S_GA(30), .M_AL(41), .M_BE(11), .M_GA(30), .TARGET(13.14))
    u5 (.clk, .finished(fin[5]), .checks(ch[5]), .failures(fl[5]));
  wl_unit #(.NAME("b15"), .T2_N1(16.82), .T2_N2(7.34),    .L(90),  .NMAX(3), .B_AL(42), .B_BE(5),  .B_GA(43),
            .S_AL(45), .S_BE(5),  .S_GA(40), .M_AL(45), .M_BE(5),  .M_GA(40), .TARGET(5.95))
    u6 (.clk, .finished(fin[6]), .checks(ch[6]), .failures(fl[6]));
  wl_unit #(.NAME("b20"), .T2_N1(16.68), .T2_N2(7.15),    .L(98),  .NMAX(2), .B_AL(42), .B_BE(14), .B_GA(42),
            .S_AL(49), .S_BE(14), .S_GA(35), .M_AL(49), .M_BE(14), .M_GA(35), .TARGET(13.08))
    u7 (.clk, .finished(fin[7]), .checks(ch[7]), .failures(fl[7]));
  wl_unit #(.NAME("b21"), .T2_N1(16.68), .T2_N2(7.15),    .L(98),  .NMAX(2), .B_AL(42), .B_BE(14), .B_GA(42),
            .S_AL(49), .S_BE(14), .S_GA(35), .M_AL(49), .M_BE(14), .M_GA(35), .TARGET(13.08))
    u8 (.clk, .finished(fin[8]), .checks(ch[8]), .failures(fl[8]));
  wl_unit #(.NAME("b22"), .T2_N1(16.78), .T2_N2(7.28),    .L(92),  .NMAX(2), .B_AL(39), .B_BE(13), .B_GA(40),
            .S_AL(46), .S_BE(13), .S_GA(33), .M_AL(46), .M_BE(13), .M_GA(33), .TARGET(13.12))
    u9 (.clk, .finished(fin[9]), .checks(ch[9]), .failures(fl[9]));

  initial begin : watchdog
    repeat (6 * 3000 * 200) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (&fin);
    checks = 0; failures = 0;
    for (int i = 0; i < NU; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
