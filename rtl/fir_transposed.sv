// fir_transposed: transposed-form FIR filter.
//
// Obtained from the direct form by exchanging input and output, reversing the
// signal flow and swapping adders and forks: the new sample is broadcast to all
// TAPS multipliers at once, and the delay line holds partial sums instead of
// samples. Register r[k] holds sum_{j>k} h(j+1) x[n+k-j], so each clock
//     y[n]  = h(1) x[n] + r[0]
//     r[k] <= h(k+2) x[n] + r[k+1]     (r[TAPS-2] <= h(TAPS) x[n])
// Only one adder sits between any two registers, so no adder tree limits the
// clock. The impulse response equals that of the direct form.
//
// Interface and timing are the same as fir_direct: when in_valid is 1 the
// partial sums advance and y_out takes the output for x_in; out_valid follows
// in_valid by one clock. Registering the output is this design's choice.
module fir_transposed #(
  parameter int                      TAPS   = fir_pkg::TAPS,
  parameter int                      IN_W   = fir_pkg::IN_W,
  parameter int                      COEF_W = fir_pkg::COEF_W,
  parameter logic [TAPS*COEF_W-1:0] COEF   = fir_pkg::COEFS,
  parameter int                      OUT_W  = IN_W + COEF_W + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out
);

  localparam int PROD_W = IN_W + COEF_W;

  logic signed [PROD_W-1:0] prod [TAPS];
  logic signed [OUT_W-1:0]  r    [TAPS-1];  // partial-sum delay line
  logic signed [OUT_W-1:0]  r_next [TAPS-1];
  logic signed [OUT_W-1:0]  y_next;

  always_comb begin
    for (int k = 0; k < TAPS; k++) prod[k] = x_in * $signed(COEF[k*COEF_W +: COEF_W]);
    y_next = OUT_W'(prod[0]) + r[0];
    for (int k = 0; k < TAPS-2; k++) r_next[k] = OUT_W'(prod[k+1]) + r[k+1];
    r_next[TAPS-2] = OUT_W'(prod[TAPS-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS-1; k++) r[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < TAPS-1; k++) r[k] <= r_next[k];
        y_out <= y_next;
      end
    end
  end

endmodule
