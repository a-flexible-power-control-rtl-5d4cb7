// power_ctrl_cell: flexible scan-in power control for one scan chain.
//
// One filter of the highest order N_MAX is shared by all filter orders.
// Each future bit T_j+k (k >= 1) has a control signal ctrl[k]; when it is 1
// the bit is switched off: it reaches the AND bank as 1 and the OR bank as
// 0, so it no longer affects either. With all control signals at 1 both
// banks reduce to T_j and the PSF bit is scanned in unfiltered; with
// ctrl[k] = 1 only for k > n the cell is the order-n filter; with all at 0
// it is the order-N_MAX filter.
//
// Interface: t[k] = T_j+k from the PSF, s_prev = first FF of the chain,
// scan_in = bit shifted into the chain this cycle. Purely combinational.
// "All control signals 1 = raw T_j, all 0 = full filter" follows the
// method; the per-bit neutral values and the code 10 for the order-1
// filter are this design's own choices.
module power_ctrl_cell #(
  parameter int unsigned N_MAX = 2
) (
  input  logic [N_MAX:0] t,
  input  logic [N_MAX:1] ctrl,     // 1 = future bit T_j+k inactive
  input  logic           s_prev,
  output logic           scan_in
);

  logic [N_MAX:0] t_and, t_or;

  always_comb begin
    t_and[0] = t[0];
    t_or[0]  = t[0];
    for (int unsigned k = 1; k <= N_MAX; k++) begin
      t_and[k] = t[k] | ctrl[k];
      t_or[k]  = t[k] & ~ctrl[k];
    end
  end

  new_plpf #(.N(N_MAX)) u_plpf (
    .t_and  (t_and),
    .t_or   (t_or),
    .s_prev (s_prev),
    .s_out  (scan_in)
  );

endmodule
