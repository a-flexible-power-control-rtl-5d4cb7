// tb_power_ctrl_cell: self-checking test of the flexible control cell.
// Exhaustive over T_j..T_j+2, the two control signals and the past bit:
// a control signal of 1 must remove its future bit from the decision, so
// 11 gives T_j, 10 the order-1 filter and 00 the order-2 filter. The output
// is compared with a model that lists the active bits and keeps the past
// value unless all of them disagree with it.
module tb_power_ctrl_cell;
  int checks = 0, failures = 0;
  logic [2:0] t;
  logic [2:1] ctrl;
  logic       s_prev, scan_in;

  power_ctrl_cell #(.N_MAX(2)) dut (.t, .ctrl, .s_prev, .scan_in);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_out, all_differ;
    for (int v = 0; v < 64; v++) begin
      {s_prev, ctrl, t} = 6'(v);
      #1;
      all_differ = (t[0] != s_prev);
      if (!ctrl[1] && t[1] == s_prev) all_differ = 1'b0;
      if (!ctrl[2] && t[2] == s_prev) all_differ = 1'b0;
      exp_out = all_differ ? ~s_prev : s_prev;
      checks++;
      if (scan_in !== exp_out) begin
        failures++;
        $display("FAIL t=%b ctrl=%b s_prev=%b -> %b, expected %b", t, ctrl, s_prev, scan_in, exp_out);
      end
      if (ctrl == 2'b11) begin
        checks++;
        if (scan_in !== t[0]) begin
          failures++;
          $display("FAIL PSF mode does not pass T_j");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
