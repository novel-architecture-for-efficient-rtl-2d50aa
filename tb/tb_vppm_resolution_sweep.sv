// tb_vppm_resolution_sweep: the modulator at every dimming-step resolution
// of the complexity comparison, from a 33.33 % step (codeword length 3) to a
// 1 % step (codeword length 100).
//
// Nine lanes run in parallel, one per codeword length; each checks the level
// width against the resolution bits of that configuration and every output
// sample of every (level, data) pair against the codeword table.
module tb_vppm_resolution_sweep;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  localparam int N = 9;
  localparam int unsigned NTS [N]  = '{3, 5, 10, 20, 30, 40, 50, 80, 100};
  localparam int unsigned BITS [N] = '{2, 3, 4, 5, 5, 6, 6, 7, 7};

  logic [N-1:0] done;
  int lane_checks [N];
  int lane_failures [N];

  for (genvar i = 0; i < N; i++) begin : g_lane
    vppm_sweep_lane #(.NT(NTS[i]), .RES_BITS(BITS[i])) u_lane (
      .clk(clk), .rst_n(rst_n), .done(done[i]),
      .checks(lane_checks[i]), .failures(lane_failures[i])
    );
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks = 0, failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    for (int i = 0; i < N; i++) begin
      $display("codeword length %0d: checks=%0d failures=%0d", NTS[i],
               lane_checks[i], lane_failures[i]);
      checks += lane_checks[i];
      failures += lane_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
