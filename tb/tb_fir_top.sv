// tb_fir_top: end-to-end testbench of fir_top at its default sizes.
//
// Drives the filter with the four test signals used to verify it - a unit
// impulse, a unit step, a sine wave and a sine wave with added noise - followed
// by random samples with extremes (and some negative-zero codes), through the
// valid/ready input, with the source sometimes idle. Samples and results are in
// sign-magnitude form at the ports; the testbench encodes and decodes them. For each of the five structures it checks every output
// strobe against the integer reference y[n] = sum_k H[k] x[n-k] (tb_fir_pkg) and
// at the right clock (set by the accepting edge itself for direct, transposed and
// symmetric, 8 edges for DA and MAC), and that no strobe comes unexpectedly.
// It also checks the impulse response (the coefficients) and the settled step
// response (64 per unit) explicitly.
//
// It counts how often each mechanism of the design was exercised and fails a
// mechanism that never happened: input stalls while DA/MAC are busy,
// back-to-back accepts at the full rate of one sample per 9 clocks, idle source
// clocks, DA sums whose sign-bit step subtracts a nonzero table entry, symmetric
// pre-additions that leave the 8-bit sample range, and negative and positive
// outputs, negative-zero input codes. Ends with the TB_RESULT line; a watchdog
// stops a hung run.
module tb_fir_top;
  import tb_fir_pkg::*;

  localparam int OUT_W = 19;
  localparam int NF    = 5;          // direct, transposed, symmetric, DA, MAC
  localparam int LAT [NF] = '{0, 0, 0, 8, 8};
  localparam int N_SINE = 64;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic                    in_ready;
  logic [7:0]              x_in = '0;     // sign-magnitude
  logic                    direct_valid, transposed_valid, symmetric_valid, da_valid, mac_valid;
  logic [OUT_W-1:0]        direct_y, transposed_y, symmetric_y, da_y, mac_y;  // sign-magnitude

  fir_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  int stim [$];
  int resp [$];        // reference outputs, in order
  hist_t hist = '{default: 0};

  function automatic int clamp8(int v);
    if (v > 127)  return 127;
    if (v < -127) return -127;
    return v;
  endfunction

  // sign-magnitude encoding of a sample; the value 1000 stands for negative zero
  function automatic logic [7:0] sm8(int v);
    if (v == 1000) return 8'h80;
    if (v < 0)     return {1'b1, 7'(-v)};
    return {1'b0, 7'(v)};
  endfunction

  function automatic int sm8_value(logic [7:0] c);
    return c[7] ? -int'(c[6:0]) : int'(c[6:0]);
  endfunction

  function automatic int sm_out_value(logic [OUT_W-1:0] c);
    return c[OUT_W-1] ? -int'(c[OUT_W-2:0]) : int'(c[OUT_W-2:0]);
  endfunction

  task automatic build_stimulus();
    for (int i = 0; i < 10; i++) stim.push_back(i == 0 ? 1 : 0);          // unit impulse
    for (int i = 0; i < 10; i++) stim.push_back(1);                        // unit step
    for (int i = 0; i < 6; i++)  stim.push_back(0);
    for (int i = 0; i < N_SINE; i++)                                       // sine
      stim.push_back(int'($rtoi(100.0 * $sin(2.0 * 3.14159265358979 * i / 32.0))));
    for (int i = 0; i < N_SINE; i++)                                       // sine + noise
      stim.push_back(clamp8(int'($rtoi(100.0 * $sin(2.0 * 3.14159265358979 * i / 32.0)))
                            + int'($urandom_range(60)) - 30));
    for (int i = 0; i < 400; i++)                                          // random
      stim.push_back((i % 50 == 7) ? 1000 : clamp8(pick_sample()));
  endtask

  // ---------------------------------------------------------------- counters
  int n_stall = 0, n_backtoback = 0, n_idle = 0, n_da_signbit = 0, n_preadd_wide = 0;
  int n_neg = 0, n_pos = 0, n_negzero = 0;
  int last_accept = -100;

  // ---------------------------------------------------------------- output checking
  int due_q [NF][$];
  int val_q [NF][$];
  int seen  [NF];

  function automatic bit fv(int f);
    case (f)
      0: return direct_valid;
      1: return transposed_valid;
      2: return symmetric_valid;
      3: return da_valid;
      default: return mac_valid;
    endcase
  endfunction

  function automatic int fy(int f);
    case (f)
      0: return sm_out_value(direct_y);
      1: return sm_out_value(transposed_y);
      2: return sm_out_value(symmetric_y);
      3: return sm_out_value(da_y);
      default: return sm_out_value(mac_y);
    endcase
  endfunction

  task automatic check_outputs();
    for (int f = 0; f < NF; f++) begin
      bit exp_v;
      exp_v = (due_q[f].size() > 0 && due_q[f][0] == cyc);
      checks++;
      if (fv(f) !== exp_v) begin
        failures++;
        $display("structure %0d: valid=%0b unexpected at cycle %0d", f, fv(f), cyc);
      end else if (exp_v) begin
        if (fy(f) != val_q[f][0]) begin
          failures++;
          $display("structure %0d: y=%0d expected %0d (output %0d)", f, fy(f), val_q[f][0], seen[f]);
        end
        seen[f]++;
        void'(due_q[f].pop_front());
        void'(val_q[f].pop_front());
      end
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int next, exp;
    seen = '{default: 0};
    build_stimulus();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    next = 0;
    while (next < stim.size()) begin
      @(negedge clk);
      check_outputs();
      if (!in_valid) begin
        // the first part runs at full rate; later the source pauses now and then
        if (next < 60 || $urandom_range(5) != 0) begin
          in_valid = 1'b1;
          x_in     = sm8(stim[next]);
        end else begin
          n_idle++;
        end
      end
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        if (cyc - last_accept == 9) n_backtoback++;
        last_accept = cyc;
        if (x_in == 8'h80) n_negzero++;
        hist = push(hist, sm8_value(x_in));
        exp  = fir_ref(hist);
        resp.push_back(exp);
        if (exp < 0) n_neg++;
        if (exp > 0) n_pos++;
        begin
          int l7;
          l7 = 0;
          for (int k = 0; k < NTAPS; k++) if (hist[k] < 0) l7 += H[k];
          if (l7 != 0) n_da_signbit++;
        end
        for (int k = 0; k < NTAPS / 2; k++) begin
          int pre;
          pre = hist[k] + hist[NTAPS-1-k];
          if (pre > 127 || pre < -128) n_preadd_wide++;
        end
        for (int f = 0; f < NF; f++) begin
          due_q[f].push_back(cyc + 1 + LAT[f]);
          val_q[f].push_back(exp);
        end
        next++;
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
    end
    repeat (12) begin
      @(negedge clk);
      check_outputs();
    end

    // every sample produced one result in every structure
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (seen[f] != stim.size() || due_q[f].size() != 0) begin
        failures++;
        $display("structure %0d produced %0d of %0d outputs", f, seen[f], stim.size());
      end
    end
    // impulse response = coefficients; step response settles at the tap sum
    for (int k = 0; k < NTAPS; k++) begin
      checks++;
      if (resp[k] != H[k]) failures++;
    end
    checks++;
    if (resp[19] != 64) begin
      failures++;
      $display("step response settled at %0d, expected 64", resp[19]);
    end

    $display("mechanisms: stalls=%0d back_to_back=%0d idle=%0d da_signbit=%0d preadd_wide=%0d neg=%0d pos=%0d negzero=%0d",
             n_stall, n_backtoback, n_idle, n_da_signbit, n_preadd_wide, n_neg, n_pos, n_negzero);
    checks++; if (n_stall == 0)       begin failures++; $display("no input stall"); end
    checks++; if (n_backtoback == 0)  begin failures++; $display("no full-rate accept"); end
    checks++; if (n_idle == 0)        begin failures++; $display("no idle source clock"); end
    checks++; if (n_da_signbit == 0)  begin failures++; $display("no DA sign-bit subtraction"); end
    checks++; if (n_preadd_wide == 0) begin failures++; $display("no wide pre-addition"); end
    checks++; if (n_neg == 0)         begin failures++; $display("no negative output"); end
    checks++; if (n_pos == 0)         begin failures++; $display("no positive output"); end
    checks++; if (n_negzero == 0)     begin failures++; $display("no negative-zero sample"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
