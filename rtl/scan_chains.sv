// scan_chains: the parallel scan structure of the circuit under test.
//
// NUM_CHAINS chains of CHAIN_LEN scan flip-flops. Flip-flop 0 of each chain
// is the scan-in end (its value is the past bit S_j-1 fed back to the
// low-pass filter) and flip-flop CHAIN_LEN-1 drives scan_out. With scan_en
// each chain shifts one place towards scan_out, taking scan_in into
// flip-flop 0; with capture every flip-flop loads the response of the
// combinational logic from capture_d; otherwise the chains hold.
//
// Interface: q exposes all flip-flops as the test stimulus of the logic;
// first_ff = q[c][0]; all updates on the rising clock edge. The asynchronous
// clear is this design's own choice (scan cells of a benchmark circuit
// normally have none) so the first filtered bit never reads an unknown.
module scan_chains #(
  parameter int unsigned NUM_CHAINS = 9,
  parameter int unsigned CHAIN_LEN  = 92
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  scan_en,
  input  logic                                  capture,
  input  logic [NUM_CHAINS-1:0]                 scan_in,
  input  logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0]  capture_d,
  output logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0]  q,
  output logic [NUM_CHAINS-1:0]                 first_ff,
  output logic [NUM_CHAINS-1:0]                 scan_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (scan_en) begin
      for (int unsigned c = 0; c < NUM_CHAINS; c++)
        q[c] <= {q[c][CHAIN_LEN-2:0], scan_in[c]};
    end else if (capture) begin
      q <= capture_d;
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < NUM_CHAINS; c++) begin
      first_ff[c] = q[c][0];
      scan_out[c] = q[c][CHAIN_LEN-1];
    end
  end

endmodule
