// pdsp_mac: conventional multiply-accumulate (MAC) unit, as in a programmable DSP.
//
// A pipelined multiplier (pipelined_mult, two stages) feeds an accumulator
// register. Each valid operand pair adds its product to the accumulator; the
// pair marked first replaces the accumulator instead, starting a new sum, and
// the pair marked last raises done when its product has been added:
//     acc <= first ? a*b : acc + a*b
// The conventional MAC is named by the filter description as the reference the
// distributed-arithmetic MAC is compared with; its insides here (two-stage
// multiplier, first/last flags) are this design's choice.
//
// Timing: an operand pair presented at edge t is in acc after edge t+2; if it
// was marked last, done is high for one clock from edge t+2 with acc final.
module pdsp_mac #(
  parameter int A_W   = fir_pkg::IN_W,
  parameter int B_W   = fir_pkg::COEF_W,
  parameter int ACC_W = A_W + B_W + $clog2(fir_pkg::TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic                    done,
  output logic signed [ACC_W-1:0] acc
);

  logic                      p_valid;
  logic signed [A_W+B_W-1:0] p;
  logic [1:0]                p_tag;   // {last, first}

  pipelined_mult #(.A_W(A_W), .B_W(B_W), .TAG_W(2)) u_mult (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a        (a),
    .b        (b),
    .tag_in   ({last, first}),
    .out_valid(p_valid),
    .p        (p),
    .tag_out  (p_tag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= p_valid && p_tag[1];
      if (p_valid) begin
        if (p_tag[0]) acc <= ACC_W'(p);
        else          acc <= acc + ACC_W'(p);
      end
    end
  end

endmodule
