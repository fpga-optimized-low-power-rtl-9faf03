// tb_sm_to_tc: exhaustive self-checking testbench for sm_to_tc (8 bits).
//
// Applies all 256 sign-magnitude codes and checks the two's-complement value:
// +m for sign 0, -m for sign 1, and 0 for negative zero. Ends with the TB_RESULT
// line; a watchdog stops a hung run.
module tb_sm_to_tc;

  logic clk = 1'b0;
  logic [7:0] sm;
  logic signed [7:0] tc;
  int checks = 0, failures = 0;

  sm_to_tc dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      int exp;
      sm  = 8'(c);
      exp = (c >= 128) ? -(c - 128) : c;
      @(negedge clk);
      checks++;
      if (int'(tc) != exp) begin
        failures++;
        $display("sm=%h tc=%0d expected %0d", sm, tc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
