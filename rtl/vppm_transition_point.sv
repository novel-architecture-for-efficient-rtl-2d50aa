// vppm_transition_point: the level-transition sample N_TP of a VPPM symbol.
//
// For data 0 the pulse sits at the start of the symbol and ends after N_D
// samples, so N_TP = N_D; for data 1 it sits at the end and begins after
// N_T - N_D samples, so N_TP = N_T - N_D. The block is a subtracter
// (N_T - N_D) and a 2:1 mux selected by D_TX. At the symbol start the new
// N_TP and D_TX are taken from the inputs and used in that same sample
// (combinational path); they are also registered and held for the rest of
// the symbol, so tx_data and dim_level may change during a symbol.
// Dimming levels above N_T are clamped to N_T (own choice). Reset clears
// the held values to N_TP = 0, D_TX = 0.
module vppm_transition_point #(
  parameter int unsigned NT = vppm_pkg::VPPM_NT,
  parameter int unsigned W  = vppm_pkg::vppm_width(NT)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sym_start,
  input  logic         tx_data,
  input  logic [W-1:0] dim_level,
  output logic [W-1:0] ntp,
  output logic         d_tx
);

  localparam logic [W-1:0] NT_W = W'(NT);

  logic [W-1:0] nd;       // clamped N_D
  logic [W-1:0] ntp_new;  // subtracter + mux
  logic [W-1:0] ntp_q;
  logic         d_q;

  always_comb begin
    nd      = (dim_level > NT_W) ? NT_W : dim_level;
    ntp_new = tx_data ? NT_W - nd : nd;
    ntp     = sym_start ? ntp_new : ntp_q;
    d_tx    = sym_start ? tx_data : d_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ntp_q <= '0;
      d_q   <= 1'b0;
    end else if (sym_start) begin
      ntp_q <= ntp_new;
      d_q   <= tx_data;
    end
  end

endmodule
