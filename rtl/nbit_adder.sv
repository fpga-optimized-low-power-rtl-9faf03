// nbit_adder: N-bit two's-complement adder/subtractor, the adder component of the
// distributed-arithmetic shift-and-add unit.
//
// s = a + b when sub is 0, s = a - b when sub is 1; purely combinational, the
// result wraps modulo 2^N (the caller sizes N so that it never overflows).
// The subtract mode is this design's addition: it lets the shift-and-add unit
// weight the sign bit of a two's-complement sample by -2^(W-1).
module nbit_adder #(
  parameter int N = 19
) (
  input  logic signed [N-1:0] a,
  input  logic signed [N-1:0] b,
  input  logic                sub,
  output logic signed [N-1:0] s
);

  always_comb begin
    if (sub) s = a - b;
    else     s = a + b;
  end

endmodule
