// tb_new_plpf: self-checking test of the optimized low-pass filter.
// Filters of order 1, 2 and 3 are fed from one random bit stream with the
// look-ahead taken from a delay line, and their outputs are fed back as the
// past bit, as a scan chain does. Every cycle the output must keep the past
// value unless all N+1 input bits disagree with it; over 60 000 bits the
// toggle rate must match 1/(2^(N+2)-2): 16.67 %, 7.14 %, 3.33 %.
module tb_new_plpf;
  localparam int NBITS = 60000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] stream;            // stream[k] = T_j+k
  logic [1:0] s1_in;  logic s1_out, s1_prev;
  logic [2:0] s2_in;  logic s2_out, s2_prev;
  logic [3:0] s3_in;  logic s3_out, s3_prev;
  assign s1_in = stream[1:0];
  assign s2_in = stream[2:0];
  assign s3_in = stream[3:0];

  new_plpf #(.N(1)) f1 (.t_and(s1_in), .t_or(s1_in), .s_prev(s1_prev), .s_out(s1_out));
  new_plpf #(.N(2)) f2 (.t_and(s2_in), .t_or(s2_in), .s_prev(s2_prev), .s_out(s2_out));
  new_plpf #(.N(3)) f3 (.t_and(s3_in), .t_or(s3_in), .s_prev(s3_prev), .s_out(s3_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic expect_out(input logic prev, input logic [3:0] bits, input int n);
    logic all_differ;
    all_differ = 1'b1;
    for (int k = 0; k <= n; k++) if (bits[k] == prev) all_differ = 1'b0;
    return all_differ ? ~prev : prev;
  endfunction

  initial begin : watchdog
    repeat (NBITS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tog1, tog2, tog3;
    real r1, r2, r3;
    tog1 = 0; tog2 = 0; tog3 = 0;
    stream  = 4'($urandom);
    s1_prev = 1'b0; s2_prev = 1'b0; s3_prev = 1'b0;
    for (int i = 0; i < NBITS; i++) begin
      @(negedge clk);
      check(s1_out == expect_out(s1_prev, stream, 1), "order 1 function");
      check(s2_out == expect_out(s2_prev, stream, 2), "order 2 function");
      check(s3_out == expect_out(s3_prev, stream, 3), "order 3 function");
      if (i > 0) begin
        tog1 += int'(s1_out != s1_prev);
        tog2 += int'(s2_out != s2_prev);
        tog3 += int'(s3_out != s3_prev);
      end
      s1_prev = s1_out; s2_prev = s2_out; s3_prev = s3_out;
      stream  = {1'($urandom), stream[3:1]};
    end
    r1 = 100.0 * tog1 / (NBITS - 1);
    r2 = 100.0 * tog2 / (NBITS - 1);
    r3 = 100.0 * tog3 / (NBITS - 1);
    $display("toggle rates: n=1 %f%%  n=2 %f%%  n=3 %f%%", r1, r2, r3);
    check(r1 > 16.67 - 0.7 && r1 < 16.67 + 0.7, "order 1 toggle rate");
    check(r2 > 7.14 - 0.5 && r2 < 7.14 + 0.5,   "order 2 toggle rate");
    check(r3 > 3.33 - 0.4 && r3 < 3.33 + 0.4,   "order 3 toggle rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
