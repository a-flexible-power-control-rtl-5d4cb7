// tb_scan_chains: self-checking test of the parallel scan chains.
// Three chains of 8 flip-flops against an array model: random shifts,
// random captures and hold cycles, checking every flip-flop, first_ff and
// scan_out after each clock.
module tb_scan_chains;
  localparam int NC = 3, L = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b1, scan_en = 1'b0, capture = 1'b0;
  logic [NC-1:0] scan_in, first_ff, scan_out;
  logic [NC-1:0][L-1:0] capture_d, q, model;
  int checks = 0, failures = 0;

  scan_chains #(.NUM_CHAINS(NC), .CHAIN_LEN(L)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; if (failures < 10) $display("FAIL chain state %h vs %h", q, model); end
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (first_ff[c] !== model[c][0] || scan_out[c] !== model[c][L-1]) begin
          failures++; $display("FAIL ends of chain %0d", c);
        end
      end
      scan_en   = ($urandom % 4) != 0;
      capture   = !scan_en && ($urandom % 2 == 1);
      scan_in   = NC'($urandom);
      capture_d = (NC*L)'({$urandom, $urandom});
      if (scan_en)
        for (int c = 0; c < NC; c++) model[c] = {model[c][L-2:0], scan_in[c]};
      else if (capture)
        model = capture_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
