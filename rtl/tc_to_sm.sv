// tc_to_sm: two's-complement to sign-magnitude converter.
//
// Converts a W-bit two's-complement result to the sign-magnitude form in which
// the filter delivers its outputs: bit W-1 is the sign (1 = negative), bits
// W-2..0 the magnitude |tc|. The one value with no sign-magnitude code,
// -2^(W-1), is saturated to -(2^(W-1)-1); the filter outputs never reach it at
// the default sizes (|y| <= 127 * 80 against 2^18). Zero has sign 0.
// Combinational.
module tc_to_sm #(
  parameter int W = fir_pkg::OUT_W
) (
  input  logic signed [W-1:0] tc,
  output logic        [W-1:0] sm
);

  logic [W-1:0] mag;

  always_comb begin
    if (tc[W-1]) mag = W'(-tc);
    else         mag = W'(tc);
    if (mag[W-1]) mag = {1'b0, {(W-1){1'b1}}};   // -2^(W-1) saturates
    sm = {tc[W-1], mag[W-2:0]};
  end

endmodule
