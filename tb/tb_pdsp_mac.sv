// tb_pdsp_mac: self-checking testbench for pdsp_mac (8 x 8 bits, 19-bit sum).
//
// Issues multiply-accumulate sequences of random length 1..8 (first on the first
// pair, last on the last), with random idle clocks inside and between them, and
// checks that done rises exactly two edges after the last pair is presented and
// that acc then equals the integer sum of the products of the sequence.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_pdsp_mac;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, first = 1'b0, last = 1'b0;
  logic signed [7:0]  a = '0, b = '0;
  logic               done;
  logic signed [18:0] acc;
  int checks = 0, failures = 0;
  int cyc = 0;

  pdsp_mac dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // done must be high only in the clock after each expected edge
  int done_q [$];
  int acc_q [$];

  always @(negedge clk) if (rst_n) begin
    bit exp_done;
    exp_done = (done_q.size() > 0 && done_q[0] == cyc);
    checks++;
    if (done !== exp_done) begin
      failures++;
      $display("done=%0b unexpected at cycle %0d", done, cyc);
    end else if (done && int'(acc) != acc_q[0]) begin
      failures++;
      $display("acc=%0d expected %0d", acc, acc_q[0]);
    end
    if (exp_done) begin
      void'(done_q.pop_front());
      void'(acc_q.pop_front());
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 600; s++) begin
      int len, sum;
      len = $urandom_range(8, 1);
      sum = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          first = 1'($urandom);   // flags must be ignored without in_valid
          last  = 1'($urandom);
          @(negedge clk);
        end
        in_valid = 1'b1;
        first = (i == 0);
        last  = (i == len - 1);
        a = (s % 8 == 0) ? -8'sd128 : 8'($urandom);
        b = (s % 8 == 0) ? -8'sd128 : 8'($urandom);
        sum += int'(a) * int'(b);
        if (last) begin
          // the edge that samples this pair is cyc+1; acc and done follow two edges on
          acc_q.push_back(sum);
          done_q.push_back(cyc + 3);
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      first = 1'b0;
      last = 1'b0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
