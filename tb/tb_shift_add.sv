// tb_shift_add: self-checking testbench for shift_add (11-bit input, 19-bit sum).
//
// Runs random 8-step sequences as the DA filter does: step b feeds a random
// 11-bit value L_b, first=1 on step 0 and sub=1 on step 7, with random idle
// clocks (en=0) in between. After the last step acc must equal
// sum_{b<7} 2^b L_b - 2^7 L_7, and it must not change while en is 0.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_shift_add;

  localparam int DIN_W = 11;
  localparam int ACC_W = 19;
  localparam int W     = ACC_W - DIN_W;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0, sub = 1'b0;
  logic signed [DIN_W-1:0] din = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  shift_add dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 1000; s++) begin
      int exp;
      exp = 0;
      for (int b = 0; b < W; b++) begin
        int l;
        l = (s % 4 == 0) ? ((b % 2 == 0) ? -(1 << (DIN_W-1)) : (1 << (DIN_W-1)) - 1)
                         : int'($urandom_range((1 << DIN_W) - 1)) - (1 << (DIN_W-1));
        din   = DIN_W'(l);
        en    = 1'b1;
        first = (b == 0);
        sub   = (b == W-1);
        exp  += (b == W-1) ? -(l <<< b) : (l <<< b);
        @(negedge clk);
        // random idle clocks: acc must hold
        en = 1'b0;
        if ($urandom_range(3) == 0) begin
          logic signed [ACC_W-1:0] held;
          held = acc;
          din = DIN_W'($urandom);
          first = 1'($urandom_range(1));
          @(negedge clk);
          checks++;
          if (acc !== held) begin
            failures++;
            $display("acc changed while en=0");
          end
        end
      end
      checks++;
      if (int'(acc) != exp) begin
        failures++;
        $display("sequence %0d: acc=%0d expected %0d", s, acc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
