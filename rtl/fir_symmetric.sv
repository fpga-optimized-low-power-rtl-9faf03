// fir_symmetric: symmetric (linear-phase) FIR filter with folded delay line.
//
// The coefficients are symmetric, h(k+1) = h(TAPS-k), so samples that meet the
// same coefficient are added first and each sum is multiplied once:
//     y[n] = (x[n]+x[n-5]) h(1) + (x[n-1]+x[n-4]) h(2) + (x[n-2]+x[n-3]) h(3)
// for the 6-tap filter: TAPS/2 pre-adders and TAPS/2 multipliers instead of TAPS
// multipliers. Only coefficients h(1)..h(TAPS/2) are used; COEF must be
// symmetric and TAPS even, which elaboration checks. The result equals that of
// the direct form.
//
// Interface and timing are the same as fir_direct: when in_valid is 1 the delay
// line shifts x_in in and y_out takes the output for it; out_valid follows
// in_valid by one clock. Registering the output is this design's choice.
module fir_symmetric #(
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

  localparam int HALF   = TAPS / 2;
  localparam int PRE_W  = IN_W + 1;
  localparam int PROD_W = PRE_W + COEF_W;

  logic signed [IN_W-1:0]   dly  [TAPS-1];  // dly[k] = x[n-1-k]
  logic signed [IN_W-1:0]   tap  [TAPS];    // tap[k] = x[n-k]
  logic signed [PRE_W-1:0]  pre  [HALF];
  logic signed [PROD_W-1:0] prod [HALF];
  logic signed [OUT_W-1:0]  sum;

  // Elaboration checks: the folded structure is only valid for an even number
  // of symmetric coefficients.
  if (TAPS % 2 != 0) begin : g_odd_taps
    $error("fir_symmetric: TAPS must be even");
  end
  for (genvar k = 0; k < HALF; k++) begin : g_sym_check
    if (COEF[k*COEF_W +: COEF_W] != COEF[(TAPS-1-k)*COEF_W +: COEF_W]) begin : g_asym
      $error("fir_symmetric: coefficients are not symmetric");
    end
  end

  always_comb begin
    tap[0] = x_in;
    for (int k = 1; k < TAPS; k++) tap[k] = dly[k-1];
    sum = '0;
    for (int k = 0; k < HALF; k++) begin
      pre[k]  = PRE_W'(tap[k]) + PRE_W'(tap[TAPS-1-k]);
      prod[k] = pre[k] * $signed(COEF[k*COEF_W +: COEF_W]);
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
