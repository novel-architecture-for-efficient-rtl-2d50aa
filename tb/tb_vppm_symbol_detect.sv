// tb_vppm_symbol_detect: self-checking test of the symbol-start detector.
//
// Drives random enable and symbol-clock patterns (including symbol clocks of
// several periods and a long enable-low stretch) and compares sym_start and
// active every sample with a cycle model kept in the testbench: a start is a
// 0->1 step of sym_clk while enabled, and active holds from a start until
// the enable drops. Counts starts seen and ends with the TB_RESULT line.
module tb_vppm_symbol_detect;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic sym_clk = 1'b0;
  logic sym_start, active;

  int checks = 0, failures = 0, starts = 0;

  vppm_symbol_detect dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic m_prev = 1'b0, m_in = 1'b0;

  task automatic step_and_check();
    logic exp_start, exp_active;
    #1;
    exp_start  = en && sym_clk && !m_prev;
    exp_active = exp_start || (en && m_in);
    checks++;
    if (sym_start !== exp_start || active !== exp_active) begin
      failures++;
      $display("mismatch t=%0t en=%b sym=%b start=%b/%b active=%b/%b",
               $time, en, sym_clk, sym_start, exp_start, active, exp_active);
    end
    if (exp_start) starts++;
    @(posedge clk);
    m_prev = sym_clk;
    if (!en) m_in = 1'b0; else if (exp_start) m_in = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    int period;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 60; blk++) begin
      period = 2 + $urandom_range(0, 12);
      en = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < 4 * period; i++) begin
        sym_clk = ((i % period) < period / 2) ? 1'b0 : 1'b1;
        if ($urandom_range(0, 40) == 0) en = ~en;
        step_and_check();
      end
    end
    // a burst of fully random symbol-clock levels
    en = 1'b1;
    for (int i = 0; i < 400; i++) begin
      sym_clk = $urandom_range(0, 1);
      step_and_check();
    end
    checks++;
    if (starts < 50) begin
      failures++;
      $display("too few symbol starts: %0d", starts);
    end
    $display("symbol starts seen: %0d", starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
