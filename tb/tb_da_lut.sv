// tb_da_lut: self-checking testbench for da_lut with the default coefficients.
//
// Reads all 2^6 addresses and compares each entry with the sum of the integer
// coefficients (tb_fir_pkg::H) whose address bit is set. Ends with the
// TB_RESULT line; a watchdog stops a hung run.
module tb_da_lut;
  import tb_fir_pkg::*;

  logic clk = 1'b0;
  logic [5:0] addr;
  logic signed [10:0] data;
  int checks = 0, failures = 0;

  da_lut dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      int exp;
      exp = 0;
      addr = 6'(a);
      for (int k = 0; k < NTAPS; k++) if (a[k]) exp += H[k];
      @(negedge clk);
      checks++;
      if (int'(data) != exp) begin
        failures++;
        $display("addr=%0d data=%0d expected %0d", a, data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
