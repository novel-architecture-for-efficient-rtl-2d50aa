// vppm_modulator: dimmable variable pulse position modulation (VPPM)
// transmitter built from a counter, a comparator, a subtracter, an inverter
// and two 2:1 muxes instead of a codeword table.
//
// One symbol carries one bit D_TX and lasts N_T samples of the sample clock.
// A dimming level N_D (0..N_T) sets the pulse width to N_D samples: for
// D_TX = 0 the pulse is at the start of the symbol, for D_TX = 1 at its end.
// Equivalently the output is ~D_TX before the transition point N_TP and D_TX
// from it on, with N_TP = N_D (D_TX = 0) or N_T - N_D (D_TX = 1). The result
// equals the codeword table c0[k] = (k < N_D), c1[k] = (k >= N_T - N_D),
// whose size would grow with N_T; here only the bit widths do.
//
// Interface: clk is the sample clock; sym_clk, synchronous to clk, rises
// once per symbol; tx_data and dimming_level are sampled in the first sample
// of each symbol (sym_start). vppm_out is registered: sample k of a symbol
// appears one clock after the cycle in which sample_idx = k. With mod_en low
// the output is 0 and no symbol starts.
//
// Following the design: the structure and the N_TP rule. Own choices: the
// rising-edge symbol detection, the enable, the output register, clamping of
// levels above N_T and holding the count at N_T - 1.
module vppm_modulator #(
  parameter int unsigned NT = vppm_pkg::VPPM_NT,
  parameter int unsigned W  = vppm_pkg::vppm_width(NT)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mod_en,
  input  logic         sym_clk,
  input  logic         tx_data,
  input  logic [W-1:0] dimming_level,
  output logic         vppm_out,
  output logic [W-1:0] sample_idx,
  output logic         sym_start
);

  logic         active;
  logic [W-1:0] ntp;
  logic         d_tx;

  vppm_symbol_detect u_detect (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (mod_en),
    .sym_clk  (sym_clk),
    .sym_start(sym_start),
    .active   (active)
  );

  vppm_sample_counter #(.NT(NT), .W(W)) u_counter (
    .clk      (clk),
    .rst_n    (rst_n),
    .sym_start(sym_start),
    .active   (active),
    .ns       (sample_idx)
  );

  vppm_transition_point #(.NT(NT), .W(W)) u_tp (
    .clk      (clk),
    .rst_n    (rst_n),
    .sym_start(sym_start),
    .tx_data  (tx_data),
    .dim_level(dimming_level),
    .ntp      (ntp),
    .d_tx     (d_tx)
  );

  vppm_output_select #(.W(W)) u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .active(active),
    .ns    (sample_idx),
    .ntp   (ntp),
    .d_tx  (d_tx),
    .s_vppm(vppm_out)
  );

endmodule
