// tb_pipelined_mult: self-checking testbench for pipelined_mult (8 x 8 bits).
//
// Presents a new random operand pair, tag and valid bit every clock (corner
// values included) and checks that p = a*b, tag_out and out_valid appear exactly
// two clock edges later. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_pipelined_mult;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [7:0]  a = '0, b = '0;
  logic [1:0]         tag_in = '0, tag_out;
  logic               out_valid;
  logic signed [15:0] p;
  int checks = 0, failures = 0;
  int exp_p [3];
  int exp_t [3];
  bit exp_v [3];

  pipelined_mult dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner [4];
    corner = '{-128, 127, -1, 0};
    exp_v = '{default: 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // pipeline position 2 is the pair presented two edges ago
      if (i >= 2) begin
        checks++;
        if (out_valid !== exp_v[2] || tag_out !== 2'(exp_t[2]) ||
            (exp_v[2] && int'(p) != exp_p[2])) begin
          failures++;
          $display("p=%0d v=%0b tag=%0d expected %0d %0b %0d", p, out_valid, tag_out,
                   exp_p[2], exp_v[2], exp_t[2]);
        end
      end
      if (i < 16) begin
        a = 8'(corner[i % 4]);
        b = 8'(corner[i / 4]);
      end else begin
        a = 8'($urandom);
        b = 8'($urandom);
      end
      tag_in   = 2'($urandom);
      in_valid = 1'($urandom_range(1));
      exp_p[2] = exp_p[1]; exp_t[2] = exp_t[1]; exp_v[2] = exp_v[1];
      exp_p[1] = int'(a) * int'(b); exp_t[1] = int'(tag_in); exp_v[1] = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
