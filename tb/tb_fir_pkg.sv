// tb_fir_pkg: reference model shared by the FIR testbenches.
//
// Holds the filter's coefficients as plain integers, written out independently
// of the RTL's packed coefficient vector, and computes the expected output
// y[n] = sum_k H[k] * x[n-k] with integer arithmetic. Also provides a sample
// generator that mixes random values with the extremes of an 8-bit
// two's-complement sample (-128, -1, 0, 1, 127), which exercise the sign bit and
// the widest sums.
package tb_fir_pkg;

  localparam int NTAPS = 6;
  localparam int H [NTAPS] = '{-4, 9, 27, 27, 9, -4};

  typedef int hist_t [NTAPS];  // hist[k] = x[n-k]

  // Push a new sample into a history, newest first.
  function automatic hist_t push(hist_t h, int x);
    hist_t r;
    r[0] = x;
    for (int k = 1; k < NTAPS; k++) r[k] = h[k-1];
    return r;
  endfunction

  function automatic int fir_ref(hist_t h);
    int s = 0;
    for (int k = 0; k < NTAPS; k++) s += H[k] * h[k];
    return s;
  endfunction

  // Random 8-bit sample, one in four an extreme value.
  function automatic int pick_sample();
    int v;
    if ($urandom_range(3) == 0) begin
      case ($urandom_range(4))
        0: v = -128;
        1: v = -1;
        2: v = 0;
        3: v = 1;
        default: v = 127;
      endcase
    end else begin
      v = int'($urandom_range(255)) - 128;
    end
    return v;
  endfunction

endpackage
