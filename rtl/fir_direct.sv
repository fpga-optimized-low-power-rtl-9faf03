// fir_direct: direct-form (tapped delay line) FIR filter,
//     y[n] = sum_{k=0}^{TAPS-1} h(k+1) * x[n-k].
//
// A delay line of TAPS-1 registers holds the past samples; TAPS multipliers form
// the products of the newest sample and the delayed ones with the constant
// coefficients, and an adder tree sums them, as in the direct-form structure of
// the filter described. The sum is registered, which is this design's choice.
//
// Interface: one sample per clock at most. When in_valid is 1 the delay line
// shifts x_in in and y_out takes the output for that sample; out_valid follows
// in_valid by one clock (latency 1). The output has full precision
// (OUT_W = IN_W + COEF_W + clog2(TAPS)) and never overflows.
module fir_direct #(
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

  logic signed [IN_W-1:0]   dly  [TAPS-1];  // dly[k] = x[n-1-k]
  logic signed [IN_W-1:0]   tap  [TAPS];    // tap[k] = x[n-k]
  logic signed [PROD_W-1:0] prod [TAPS];
  logic signed [OUT_W-1:0]  sum;

  always_comb begin
    tap[0] = x_in;
    for (int k = 1; k < TAPS; k++) tap[k] = dly[k-1];
    sum = '0;
    for (int k = 0; k < TAPS; k++) begin
      prod[k] = tap[k] * $signed(COEF[k*COEF_W +: COEF_W]);
      sum     = sum + OUT_W'(prod[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS-1; k++) dly[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < TAPS-1; k++) dly[k] <= tap[k];
        y_out <= sum;
      end
    end
  end

endmodule
