// tb_tc_to_sm: self-checking testbench for tc_to_sm (19 bits).
//
// Applies the corner values (0, +-1, the largest magnitudes and the most
// negative value, which must saturate) and random values, and checks sign and
// magnitude of the sign-magnitude code against integer arithmetic. Ends with the
// TB_RESULT line; a watchdog stops a hung run.
module tb_tc_to_sm;

  localparam int W = 19;

  logic clk = 1'b0;
  logic signed [W-1:0] tc;
  logic [W-1:0] sm;
  int checks = 0, failures = 0;

  tc_to_sm dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int v);
    int mag, exp_mag;
    bit exp_sign;
    tc = W'(v);
    @(negedge clk);
    exp_sign = (v < 0);
    exp_mag  = (v < 0) ? -v : v;
    if (exp_mag > (1 << (W-1)) - 1) exp_mag = (1 << (W-1)) - 1;
    mag = int'(sm[W-2:0]);
    checks++;
    if (sm[W-1] !== exp_sign || mag != exp_mag) begin
      failures++;
      $display("tc=%0d: sm sign=%0b mag=%0d expected %0b %0d", v, sm[W-1], mag, exp_sign, exp_mag);
    end
  endtask

  initial begin
    int corner [7];
    corner = '{0, 1, -1, (1 << (W-1)) - 1, -((1 << (W-1)) - 1), -(1 << (W-1)), 10160};
    foreach (corner[i]) apply(corner[i]);
    for (int i = 0; i < 3000; i++)
      apply(int'($urandom_range((1 << W) - 1)) - (1 << (W-1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
