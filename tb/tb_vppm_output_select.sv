// tb_vppm_output_select: self-checking test of comparator, inverter and
// output mux.
//
// Applies every combination of sample index, transition point and data bit
// (4-bit fields) with the output enabled, plus random ones with it disabled,
// and checks one clock later that the registered output is
// (ns >= ntp) ? d : ~d, or 0 when disabled.
module tb_vppm_output_select;

  localparam int unsigned W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic active = 1'b0;
  logic [W-1:0] ns = '0, ntp = '0;
  logic d_tx = 1'b0;
  logic s_vppm;

  int checks = 0, failures = 0;

  vppm_output_select #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic a, input int n, input int t, input logic d);
    logic e;
    active = a; ns = W'(n); ntp = W'(t); d_tx = d;
    e = a ? ((n >= t) ? d : !d) : 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (s_vppm !== e) begin
      failures++;
      $display("mismatch a=%b ns=%0d ntp=%0d d=%b out=%b exp=%b", a, n, t, d,
               s_vppm, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (s_vppm !== 1'b0) begin
      failures++;
      $display("output not 0 after reset");
    end
    rst_n = 1'b1;
    for (int n = 0; n < (1 << W); n++)
      for (int t = 0; t < (1 << W); t++)
        for (int d = 0; d < 2; d++) apply(1'b1, n, t, d[0]);
    for (int i = 0; i < 200; i++)
      apply($urandom_range(0, 1), $urandom_range(0, 15), $urandom_range(0, 15),
            $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
