// vppm_sweep_lane: one codeword length of the dimming-resolution sweep.
//
// Instantiates the modulator with N_T = NT and checks that its level width
// equals RES_BITS, the resolution quoted for that codeword length. It then
// sends every dimming level 0..NT with data 0 and data 1, back to back with
// a symbol clock of NT samples per symbol, and compares each output sample,
// one clock after it is selected, with the codeword table
// c0[k] = (k < N_D), c1[k] = (k >= NT - N_D). It reports its counts and
// raises done when finished.
module vppm_sweep_lane #(
  parameter int unsigned NT       = 10,
  parameter int unsigned RES_BITS = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned W = vppm_pkg::vppm_width(NT);

  logic         sym_clk = 1'b0;
  logic         tx_data = 1'b0;
  logic [W-1:0] dimming_level = '0;
  logic         vppm_out, sym_start;
  logic [W-1:0] sample_idx;

  vppm_modulator #(.NT(NT)) dut (
    .clk(clk), .rst_n(rst_n), .mod_en(1'b1), .sym_clk(sym_clk),
    .tx_data(tx_data), .dimming_level(dimming_level), .vppm_out(vppm_out),
    .sample_idx(sample_idx), .sym_start(sym_start)
  );

  initial begin
    logic e;
    done = 1'b0;
    checks = 1;
    failures = (W == RES_BITS) ? 0 : 1;
    if (W != RES_BITS) $display("NT=%0d: width %0d, expected %0d", NT, W, RES_BITS);
    @(posedge rst_n);
    @(negedge clk);
    for (int lvl = 0; lvl <= int'(NT); lvl++)
      for (int d = 0; d < 2; d++)
        for (int k = 0; k < int'(NT); k++) begin
          sym_clk = (k == 0);
          tx_data = d[0];
          dimming_level = W'(lvl);
          e = d ? (k >= int'(NT) - lvl) : (k < lvl);
          @(posedge clk);
          #1;
          checks++;
          if (vppm_out !== e) begin
            failures++;
            if (failures < 10)
              $display("NT=%0d N_D=%0d d=%0d sample %0d: out=%b exp=%b", NT,
                       lvl, d, k, vppm_out, e);
          end
          @(negedge clk);
        end
    done = 1'b1;
  end

endmodule
