// new_plpf: optimized pseudo low-pass filter of order N.
//
// The filter sees the current PSF bit T_j, the future bits T_j+1..T_j+N and
// the past bit S_j-1, which is the first flip-flop of the scan chain. An
// AND bank and an OR bank combine the N+1 PSF bits and S_j-1 selects
// between them: if S_j-1 = 0 the output is the AND, if 1 the OR. The output
// therefore leaves its previous value only when all N+1 bits disagree with
// it, which lowers the expected toggle rate to 1/(2^(N+2)-2): 16.67 % for
// N = 1, 7.14 % for N = 2, 3.33 % for N = 3.
//
// Interface: t_and feeds the AND bank and t_or the OR bank. A stand-alone
// filter ties both to the same PSF bits; the flexible control cell gates
// them separately to switch future bits off. Purely combinational.
// The AND/OR/multiplexer structure and the select by the first scan FF
// follow the method; feeding every bit T_j..T_j+N (not only T_j and T_j+N)
// into both banks is the reading that yields the rates above, and the split
// into two input ports is this design's own choice.
module new_plpf #(
  parameter int unsigned N = 2
) (
  input  logic [N:0] t_and,   // bit k = T_j+k as seen by the AND bank
  input  logic [N:0] t_or,    // bit k = T_j+k as seen by the OR bank
  input  logic       s_prev,  // S_j-1, first FF of the scan chain
  output logic       s_out    // S_j, next scan-in bit
);

  logic and_all, or_any;

  always_comb begin
    and_all = &t_and;
    or_any  = |t_or;
    s_out   = s_prev ? or_any : and_all;
  end

endmodule
