// tb_fir_da: self-checking testbench for fir_da (8-bit samples, 6 taps).
//
// A source offers a unit impulse, a unit step, then random samples (with
// extremes) and idle gaps, holding each sample until in_valid && in_ready takes
// it. Every clock the testbench checks
//   - in_ready: low from an accept until the result strobe (one sample per
//     IN_W+1 = 9 clocks),
//   - out_valid: high exactly in the clock set by the edge LAT = 8 clocks after
//     the accepting edge, and never otherwise,
//   - y_out against the integer reference sum_k H[k] x[n-k] of tb_fir_pkg.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_fir_da;
  import tb_fir_pkg::*;

  localparam int OUT_W = 19;
  localparam int LAT   = 8;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic                    in_ready;
  logic signed [7:0]       x_in = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] y_out;

  int    checks = 0, failures = 0;
  int    cyc = 0;
  hist_t hist = '{default: 0};
  bit    pending = 1'b0;
  int    due = 0;
  int    exp_y = 0;
  int    sent = 0;

  fir_da dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int stimulus(int i);
    if (i == 0)  return 1;        // unit impulse
    if (i < 8)   return 0;
    if (i < 16)  return 100;      // step of height 100
    return pick_sample();
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < 2000) begin
      @(negedge clk);
      // result and ready checks for the state after edge cyc
      checks++;
      if (out_valid !== (pending && due == cyc)) begin
        failures++;
        $display("out_valid=%0b unexpected at cycle %0d (due %0d)", out_valid, cyc, due);
      end else if (out_valid && int'(y_out) != exp_y) begin
        failures++;
        $display("y_out=%0d expected %0d at cycle %0d", y_out, exp_y, cyc);
      end
      if (pending && due == cyc) pending = 1'b0;
      checks++;
      if (in_ready !== !pending) begin
        failures++;
        $display("in_ready=%0b unexpected at cycle %0d", in_ready, cyc);
      end
      // source: offer a new sample or keep the one not yet taken
      if (!in_valid) begin
        if (sent < 16 || $urandom_range(4) != 0) begin
          in_valid = 1'b1;
          x_in     = 8'(stimulus(sent));
        end
      end
      if (in_valid && in_ready) begin
        hist    = push(hist, int'(x_in));
        exp_y   = fir_ref(hist);
        pending = 1'b1;
        due     = cyc + 1 + LAT;
        sent++;
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
    end
    repeat (LAT + 2) begin
      @(negedge clk);
      checks++;
      if (out_valid !== (pending && due == cyc)) failures++;
      else if (out_valid && int'(y_out) != exp_y) failures++;
      if (pending && due == cyc) pending = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
