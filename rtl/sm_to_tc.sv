// sm_to_tc: sign-magnitude to two's-complement converter.
//
// The filter's samples are exchanged in fixed-point sign-magnitude form: bit W-1
// is the sign (1 = negative) and bits W-2..0 the magnitude, so a W-bit word holds
// -(2^(W-1)-1) .. 2^(W-1)-1, with two codes for zero. The arithmetic inside the
// filter structures is two's complement; this block converts an input word:
// tc = sign ? -magnitude : magnitude. Negative zero becomes 0. Combinational.
module sm_to_tc #(
  parameter int W = fir_pkg::IN_W
) (
  input  logic        [W-1:0] sm,
  output logic signed [W-1:0] tc
);

  logic [W-2:0] mag;

  always_comb begin
    mag = sm[W-2:0];
    if (sm[W-1]) tc = -$signed({1'b0, mag});
    else         tc =  $signed({1'b0, mag});
  end

endmodule
