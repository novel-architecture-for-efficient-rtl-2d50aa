// vppm_output_select: comparator, inverter and output mux of the modulator.
//
// Each sample, the comparator tests n_s >= N_TP. Below the transition point
// the output is the inverted data bit, from it on the data bit itself:
//   S_VPPM_TX = (ns >= ntp) ? d_tx : ~d_tx.
// The selected level is registered, so s_vppm shows sample k one sample
// clock after the cycle in which ns = k (one cycle of latency); the register
// and the low output while active is low are this design's own choices.
module vppm_output_select #(
  parameter int unsigned W = vppm_pkg::vppm_width(vppm_pkg::VPPM_NT)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         active,
  input  logic [W-1:0] ns,
  input  logic [W-1:0] ntp,
  input  logic         d_tx,
  output logic         s_vppm
);

  logic past_tp;   // comparator
  logic level;     // output mux

  always_comb begin
    past_tp = (ns >= ntp);
    level   = past_tp ? d_tx : ~d_tx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_vppm <= 1'b0;
    else        s_vppm <= active & level;
  end

endmodule
