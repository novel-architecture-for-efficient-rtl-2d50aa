// tb_vppm_sample_counter: self-checking test of the sample-index counter.
//
// Uses N_T = 10. Issues symbol starts at random spacings (shorter than,
// equal to and longer than N_T samples) with the count enable sometimes
// dropped, and checks ns every sample against the expected index: 0 in the
// start sample, +1 per active sample, held at N_T - 1 and frozen while
// inactive. Also checks that a regular stream of starts every N_T samples
// gives the sequence 0, 1, ..., N_T - 1 in every symbol.
module tb_vppm_sample_counter;

  localparam int unsigned NT = 10;
  localparam int unsigned W  = $clog2(NT + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sym_start = 1'b0;
  logic active = 1'b0;
  logic [W-1:0] ns;

  int checks = 0, failures = 0;
  int exp_q = 0;   // model of the stored count

  vppm_sample_counter #(.NT(NT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input logic st, input logic act, input int want = -1);
    int e;
    sym_start = st;
    active    = act | st;
    #1;
    e = st ? 0 : exp_q;
    checks++;
    if (int'(ns) != e || (want >= 0 && int'(ns) != want)) begin
      failures++;
      $display("mismatch t=%0t start=%b act=%b ns=%0d exp=%0d want=%0d",
               $time, st, act, ns, e, want);
    end
    @(posedge clk);
    if (active && e != NT - 1) exp_q = e + 1; else exp_q = e;
    @(negedge clk);
  endtask

  initial begin
    int gap;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // regular symbols: 0..NT-1 in every symbol
    for (int s = 0; s < 20; s++)
      for (int k = 0; k < NT; k++) sample(k == 0, 1'b1, k);
    // irregular spacing, including symbols longer than NT (count holds)
    for (int s = 0; s < 300; s++) begin
      gap = $urandom_range(1, 2 * NT);
      for (int k = 0; k < gap; k++)
        sample(k == 0, ($urandom_range(0, 7) != 0), -1);
    end
    // long symbol: the index must stop at NT-1
    sample(1'b1, 1'b1, 0);
    for (int k = 1; k < 3 * NT; k++) sample(1'b0, 1'b1, (k < NT) ? k : NT - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
