// vppm_sample_counter: the sample index n_s within the current VPPM symbol.
//
// The counter is reset by the symbol start and counts up once per sample
// clock. ns is the index of the sample being modulated in this cycle: it is
// 0 in the sample where sym_start is high (the reset acts in the same
// sample, as in the flow "symbol start -> n_s <- 0 -> compare"), and one more
// in each following sample while active is high.
// If the symbol clock is slower than N_T samples the count stops at N_T - 1
// rather than wrapping, so the last level of the symbol is held; this hold
// and the freeze while active is low are this design's own choices.
module vppm_sample_counter #(
  parameter int unsigned NT = vppm_pkg::VPPM_NT,
  parameter int unsigned W  = vppm_pkg::vppm_width(NT)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sym_start,
  input  logic         active,
  output logic [W-1:0] ns
);

  localparam logic [W-1:0] LAST = W'(NT - 1);

  logic [W-1:0] ns_q;

  always_comb ns = sym_start ? '0 : ns_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      ns_q <= '0;
    else if (active && ns != LAST)   ns_q <= ns + 1'b1;
  end

endmodule
