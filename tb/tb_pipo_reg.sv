// tb_pipo_reg: self-checking testbench for pipo_reg.
//
// Drives random data with random load and clear strobes (and one asynchronous
// reset in the middle) and checks q every clock against a model register: q
// follows d one clock after load, is zeroed by clr (which wins over load) and
// holds otherwise. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_pipo_reg;

  localparam int N = 19;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0;
  logic [N-1:0] d = '0, q;
  logic [N-1:0] model = '0;
  int checks = 0, failures = 0;

  pipo_reg dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (q !== model) begin
      failures++;
      $display("q=%h expected %h at %0t", q, model, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check();
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check();
      if (i == 2000) begin
        rst_n = 1'b0;          // asynchronous reset, no clock edge needed
        #1 model = '0;
        check();
        rst_n = 1'b1;
      end
      d    = N'($urandom);
      load = ($urandom_range(1) != 0);
      clr  = ($urandom_range(15) == 0);
      @(posedge clk);
      if (clr)       model = '0;
      else if (load) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
