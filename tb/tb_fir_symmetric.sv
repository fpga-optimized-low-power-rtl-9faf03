// tb_fir_symmetric: self-checking testbench for fir_symmetric.
//
// Feeds a unit impulse, then random samples (with extremes) on a random 3-in-4
// valid pattern. Every clock it checks that out_valid follows in_valid by exactly
// one clock and that y_out equals the integer reference sum_k H[k] x[n-k] of
// tb_fir_pkg. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_fir_symmetric;
  import tb_fir_pkg::*;

  localparam int OUT_W = 19;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic signed [7:0]       x_in = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] y_out;

  int    checks = 0, failures = 0;
  hist_t hist = '{default: 0};
  logic  exp_valid = 1'b0;
  int    exp_y = 0;

  fir_symmetric dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle();
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("out_valid=%0b expected %0b at %0t", out_valid, exp_valid, $time);
    end else if (exp_valid && int'(y_out) != exp_y) begin
      failures++;
      $display("y_out=%0d expected %0d at %0t", y_out, exp_y, $time);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check_cycle();
      if (i < 10) in_valid = 1'b1;
      else        in_valid = ($urandom_range(3) != 0);
      if (i < 10) x_in = (i == 0) ? 8'sd1 : 8'sd0;   // unit impulse first
      else        x_in = 8'(pick_sample());
      exp_valid = in_valid;
      if (in_valid) begin
        hist  = push(hist, int'(x_in));
        exp_y = fir_ref(hist);
      end
    end
    @(negedge clk);
    check_cycle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
