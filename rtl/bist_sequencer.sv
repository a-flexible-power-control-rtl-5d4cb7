// bist_sequencer: scan-shift / capture sequencing of the logic BIST run.
//
// A run applies NUM_PATTERNS tests; one test is CHAIN_LEN shift cycles
// followed by one capture cycle. start (in IDLE) pulses init, which reloads
// the LFSR seed and the switch-timing state; the first shift follows on the
// next clock. After the last capture the sequencer raises done and waits in
// DONE until start is seen again.
//
// Interface: scan_en is high in shift cycles, with shift_idx = 0 ..
// CHAIN_LEN-1; capture is high for the capture cycle, which also pulses the
// pattern advance for the switch-timing controller. pattern_idx counts the
// tests already captured. A run takes NUM_PATTERNS * (CHAIN_LEN + 1) + 1
// clocks from start to done.
// Shift-then-capture per test and the 30k-pattern default follow the
// reference setup; the state encoding, the start/done handshake and ending
// without a final unload are this design's own choices.
module bist_sequencer #(
  parameter int unsigned CHAIN_LEN    = 92,
  parameter int unsigned NUM_PATTERNS = 30000,
  parameter int unsigned LEN_W        = $clog2(CHAIN_LEN + 1),
  parameter int unsigned PAT_W        = $clog2(NUM_PATTERNS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             init,
  output logic             scan_en,
  output logic             capture,
  output logic [LEN_W-1:0] shift_idx,
  output logic [PAT_W-1:0] pattern_idx,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CAPTURE, S_DONE} state_e;
  state_e state;

  assign init    = start && (state == S_IDLE || state == S_DONE);
  assign scan_en = (state == S_SHIFT);
  assign capture = (state == S_CAPTURE);
  assign busy    = (state == S_SHIFT) || (state == S_CAPTURE);
  assign done    = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      shift_idx   <= '0;
      pattern_idx <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state       <= S_SHIFT;
          shift_idx   <= '0;
          pattern_idx <= '0;
        end
        S_SHIFT: begin
          if (shift_idx == LEN_W'(CHAIN_LEN - 1)) begin
            state     <= S_CAPTURE;
            shift_idx <= '0;
          end else begin
            shift_idx <= shift_idx + 1'b1;
          end
        end
        S_CAPTURE: begin
          pattern_idx <= pattern_idx + 1'b1;
          state       <= (pattern_idx == PAT_W'(NUM_PATTERNS - 1)) ? S_DONE : S_SHIFT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
                                !(scan_en && capture));
  a_shift_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  scan_en |-> shift_idx < LEN_W'(CHAIN_LEN));

endmodule
