// pipelined_mult: two-stage pipelined signed multiplier.
//
// Stage 1 registers the operands, stage 2 registers the product, so the
// multiplier array sits alone between two registers and the clock can run as
// fast as the multiplier allows; a result appears two clocks after its operands.
// A valid bit travels with the data, and a user tag (TAG_W bits, e.g. the
// first/last flags of a multiply-accumulate sequence) travels alongside.
// Pipelining multipliers for speed is named by the filter description; the
// depth of two stages is this design's choice.
//
// Timing: a, b, tag_in, in_valid sampled at edge t appear as p, tag_out,
// out_valid after edge t+1 (i.e. visible from edge t+1 on: latency 2 edges
// counting the operand register).
module pipelined_mult #(
  parameter int A_W   = fir_pkg::IN_W,
  parameter int B_W   = fir_pkg::COEF_W,
  parameter int TAG_W = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  input  logic        [TAG_W-1:0]   tag_in,
  output logic                      out_valid,
  output logic signed [A_W+B_W-1:0] p,
  output logic        [TAG_W-1:0]   tag_out
);

  logic signed [A_W-1:0] a_q;
  logic signed [B_W-1:0] b_q;
  logic [TAG_W-1:0]      tag_q;
  logic                  v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_q       <= '0;
      tag_q     <= '0;
      v_q       <= 1'b0;
      p         <= '0;
      tag_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      // stage 1: operand registers
      a_q   <= a;
      b_q   <= b;
      tag_q <= tag_in;
      v_q   <= in_valid;
      // stage 2: product register
      p         <= a_q * b_q;
      tag_out   <= tag_q;
      out_valid <= v_q;
    end
  end

endmodule
