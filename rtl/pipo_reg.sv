// pipo_reg: N-bit parallel-in parallel-out register, the storage component of the
// distributed-arithmetic shift-and-add unit.
//
// On a rising clock edge q takes d when load is 1 and keeps its value otherwise;
// clr (synchronous, takes priority over load) sets it to zero. rst_n is an
// asynchronous active-low reset to zero. The reset and clear are this design's
// choice; the register itself is named by the filter description.
module pipo_reg #(
  parameter int N = 19
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (clr)  q <= '0;
    else if (load) q <= d;
  end

endmodule
