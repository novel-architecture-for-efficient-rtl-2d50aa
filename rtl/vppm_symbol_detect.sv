// vppm_symbol_detect: finds the first sample of every VPPM symbol.
//
// The symbol clock runs at the symbol rate and is synchronous to the sample
// clock. A rising edge of sym_clk, seen as sym_clk high in a sample where it
// was low in the previous one, marks the first sample of a new symbol:
// sym_start is high for that one sample, combinationally, so the symbol's
// first sample is modulated in the same cycle (no added latency).
// active is high from the first symbol start after mod_en rises for as long
// as en stays high; it tells the rest of the modulator that a symbol is being
// sent. With en low nothing starts and active is low.
//
// Following the design: the symbol clock decides where a symbol starts.
// Own choices: rising-edge detection, the enable and the active flag.
module vppm_symbol_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic sym_clk,
  output logic sym_start,
  output logic active
);

  logic sym_clk_q;
  logic in_symbol_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_clk_q   <= 1'b0;
      in_symbol_q <= 1'b0;
    end else begin
      sym_clk_q <= sym_clk;
      if (!en)           in_symbol_q <= 1'b0;
      else if (sym_start) in_symbol_q <= 1'b1;
    end
  end

  always_comb begin
    sym_start = en & sym_clk & ~sym_clk_q;
    active    = sym_start | (en & in_symbol_q);
  end

endmodule
