// tb_vppm_transition_point: self-checking test of the N_TP computation.
//
// Uses N_T = 10. For every dimming level 0..15 (levels above 10 must be
// clamped to 10) and both data values, issues a symbol start and checks that
// N_TP is N_D for data 0 and N_T - N_D for data 1, in the start sample and,
// held, in the following samples while the inputs are changed at random.
module tb_vppm_transition_point;

  localparam int unsigned NT = 10;
  localparam int unsigned W  = $clog2(NT + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sym_start = 1'b0;
  logic tx_data = 1'b0;
  logic [W-1:0] dim_level = '0;
  logic [W-1:0] ntp;
  logic d_tx;

  int checks = 0, failures = 0;

  vppm_transition_point #(.NT(NT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_ntp(input int d, input int lvl);
    int nd = (lvl > NT) ? NT : lvl;
    return d ? NT - nd : nd;
  endfunction

  task automatic check(input int want_ntp, input int want_d);
    checks++;
    if (int'(ntp) != want_ntp || int'(d_tx) != want_d) begin
      failures++;
      $display("mismatch t=%0t ntp=%0d exp=%0d d=%b exp=%0d", $time, ntp,
               want_ntp, d_tx, want_d);
    end
  endtask

  initial begin
    int e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int lvl = 0; lvl < (1 << W); lvl++)
        for (int d = 0; d < 2; d++) begin
          tx_data = d[0];
          dim_level = W'(lvl);
          sym_start = 1'b1;
          e = expected_ntp(d, lvl);
          #1 check(e, d);
          @(negedge clk);
          sym_start = 1'b0;
          for (int k = 1; k < NT; k++) begin
            tx_data = $urandom_range(0, 1);
            dim_level = W'($urandom_range(0, (1 << W) - 1));
            #1 check(e, d);
            @(negedge clk);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
