// tb_vppm_modulator: end-to-end test of the VPPM modulator at its default
// size (N_T = 10, a 10 % dimming step).
//
// The testbench plays the role of the host and of the receiver. It generates
// a symbol clock of N_T samples per symbol, sweeps the dimming level up from
// 0 to full brightness with random data (as in a ramp test), then sends
// random levels and data, levels above N_T, symbols longer than N_T samples
// and periods with the modulator disabled. Every output sample is compared,
// one sample clock after it is selected, with the codeword table
//   bit 0: c0[k] = (k < N_D),   bit 1: c1[k] = (k >= N_T - N_D),
// built here independently of the design. sample_idx and sym_start are
// checked every sample. A loopback demodulator model decides each symbol's
// bit by comparing the pulse energy in the first and second half of the
// symbol, and must recover the data for every level strictly between 0 and
// N_T. Each mechanism (symbol start, data 0 / data 1, inverted and direct
// region, fully off, fully on, level clamp, count hold, disabled output,
// loopback detection) is counted and must occur at least once.
module tb_vppm_modulator;

  localparam int unsigned NT = vppm_pkg::VPPM_NT;
  localparam int unsigned W  = vppm_pkg::vppm_width(NT);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic mod_en = 1'b0;
  logic sym_clk = 1'b0;
  logic tx_data = 1'b0;
  logic [W-1:0] dimming_level = '0;
  logic vppm_out;
  logic [W-1:0] sample_idx;
  logic sym_start;

  vppm_modulator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_start = 0, n_d0 = 0, n_d1 = 0, n_inv = 0, n_dir = 0, n_off = 0,
      n_on = 0, n_clamp = 0, n_hold = 0, n_dis = 0, n_demod = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // Codeword table entry for sample k (Table of codewords: pulse at the
  // start for bit 0, at the end for bit 1).
  function automatic logic codeword(input logic d, input int nd, input int k);
    return d ? (k >= int'(NT) - nd) : (k < nd);
  endfunction

  // One symbol of len samples (len > NT exercises the count hold).
  task automatic send_symbol(input logic d, input int lvl, input int len);
    int nd, kk, first, second;
    logic exp_lvl, det;
    nd = (lvl > int'(NT)) ? int'(NT) : lvl;
    first = 0; second = 0;
    if (lvl > int'(NT)) n_clamp++;
    if (nd == 0) n_off++;
    if (nd == int'(NT)) n_on++;
    if (d) n_d1++; else n_d0++;
    for (int k = 0; k < len; k++) begin
      sym_clk = (k < (int'(NT) + 1) / 2);
      if (k == 0) begin
        tx_data = d;
        dimming_level = W'(lvl);
      end else begin
        // inputs may change during a symbol; only the start sample counts
        tx_data = $urandom_range(0, 1);
        dimming_level = W'($urandom_range(0, int'(NT)));
      end
      kk = (k < int'(NT)) ? k : int'(NT) - 1;
      if (k >= int'(NT)) n_hold++;
      #1;
      checks++;
      if (int'(sample_idx) != kk || sym_start !== (k == 0))
        fail($sformatf("sample %0d: sample_idx=%0d sym_start=%b", k,
                       sample_idx, sym_start));
      if (k == 0) n_start++;
      if (kk < (d ? int'(NT) - nd : nd)) n_inv++; else n_dir++;
      exp_lvl = codeword(d, nd, kk);
      @(posedge clk);
      #1;
      checks++;
      if (vppm_out !== exp_lvl)
        fail($sformatf("d=%b N_D=%0d sample %0d: out=%b exp=%b", d, nd, k,
                       vppm_out, exp_lvl));
      if (k < int'(NT) / 2) first += int'(vppm_out);
      else if (k < int'(NT)) second += int'(vppm_out);
      @(negedge clk);
    end
    // loopback demodulator model
    if (nd > 0 && nd < int'(NT)) begin
      det = (second > first);
      checks++;
      if (det !== d) fail($sformatf("demod: sent %b got %b (N_D=%0d)", d, det, nd));
      else n_demod++;
    end
  endtask

  task automatic idle(input int n);
    mod_en = 1'b0;
    for (int i = 0; i < n; i++) begin
      sym_clk = ((i % int'(NT)) < (int'(NT) + 1) / 2);
      tx_data = $urandom_range(0, 1);
      dimming_level = W'($urandom_range(0, int'(NT)));
      @(posedge clk);
      #1;
      checks++;
      n_dis++;
      if (vppm_out !== 1'b0) fail("output not 0 while disabled");
      @(negedge clk);
    end
    // leave sym_clk low so the next symbol start is a clean rising edge
    sym_clk = 1'b0;
    @(negedge clk);
    mod_en = 1'b1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle(2 * NT);
    // dimming ramp 0 .. full brightness, twice, random data
    for (int r = 0; r < 2; r++)
      for (int lvl = 0; lvl <= int'(NT); lvl++)
        send_symbol($urandom_range(0, 1), lvl, NT);
    // every level with both data values
    for (int lvl = 0; lvl <= int'(NT); lvl++)
      for (int d = 0; d < 2; d++) send_symbol(d[0], lvl, NT);
    // random traffic, including out-of-range levels and long symbols
    for (int s = 0; s < 300; s++)
      send_symbol($urandom_range(0, 1), $urandom_range(0, (1 << W) - 1),
                  ($urandom_range(0, 9) == 0) ? NT + $urandom_range(1, 5) : NT);
    // disable in the middle of a symbol
    for (int k = 0; k < int'(NT) / 2; k++) begin
      sym_clk = (k < (int'(NT) + 1) / 2);
      tx_data = 1'b0;
      dimming_level = W'(NT);
      @(negedge clk);
    end
    idle(NT);
    for (int s = 0; s < 20; s++)
      send_symbol($urandom_range(0, 1), $urandom_range(0, NT), NT);

    $display("starts=%0d d0=%0d d1=%0d inverted=%0d direct=%0d off=%0d on=%0d",
             n_start, n_d0, n_d1, n_inv, n_dir, n_off, n_on);
    $display("clamp=%0d hold=%0d disabled=%0d demod_ok=%0d",
             n_clamp, n_hold, n_dis, n_demod);
    checks++;
    if (n_start == 0 || n_d0 == 0 || n_d1 == 0 || n_inv == 0 || n_dir == 0 ||
        n_off == 0 || n_on == 0 || n_clamp == 0 || n_hold == 0 ||
        n_dis == 0 || n_demod == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
