// tb_nbit_adder: self-checking testbench for nbit_adder at its default width.
//
// Applies corner operands (0, 1, -1, the most positive and most negative
// values) in every combination and then random operands, in both add and
// subtract mode, and compares s with the sum or difference computed in 64-bit
// integers and reduced modulo 2^N. Combinational block: a clock only paces the
// checks. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_nbit_adder;

  localparam int N = 19;

  logic clk = 1'b0;
  logic signed [N-1:0] a, b, s;
  logic sub;
  int checks = 0, failures = 0;

  nbit_adder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint va, longint vb, bit vs);
    longint exp;
    a = N'(va);
    b = N'(vb);
    sub = vs;
    @(negedge clk);
    exp = vs ? (longint'(a) - longint'(b)) : (longint'(a) + longint'(b));
    checks++;
    if (s !== N'(exp)) begin
      failures++;
      $display("a=%0d b=%0d sub=%0b: s=%0d expected %0d", a, b, vs, s, $signed(N'(exp)));
    end
  endtask

  initial begin
    longint corner [5];
    corner = '{0, 1, -1, (1 << (N-1)) - 1, -(1 << (N-1))};
    foreach (corner[i]) foreach (corner[j]) begin
      apply(corner[i], corner[j], 1'b0);
      apply(corner[i], corner[j], 1'b1);
    end
    for (int i = 0; i < 4000; i++)
      apply(longint'($urandom), longint'($urandom), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
