// fir_da: bit-serial distributed-arithmetic (DA) FIR filter with one look-up table.
//
// Instead of multiplying each sample by its coefficient, the filter takes bit b of
// all TAPS samples x[n]..x[n-TAPS+1] at once, uses these TAPS bits as the address
// of a table holding every sum of coefficients (da_lut), and accumulates the
// table outputs with a shift-and-add unit (shift_add), LSB first:
//     y[n] = sum_{b<W-1} 2^b L_b  -  2^(W-1) L_(W-1)
// The last step subtracts because the samples are two's complement (the sign bit
// weighs -2^(W-1)). Following the structure described for this filter, the unit is
// built structurally from the table and the shift-and-add circuit, with one table
// and no pipelining.
//
// Sample storage: TAPS W-bit registers form the delay line. While a sample is
// processed each register rotates right by one bit per clock, so bit 0 of every
// register is the current address bit; after W rotations they are back in place,
// ready for the delay line to shift when the next sample arrives.
//
// Interface: valid/ready sample input, output strobe.
//   x_in is taken on a clock edge where in_valid && in_ready.
//   The following IN_W clocks compute; in_ready is low meanwhile.
//   out_valid is high for one clock, set by the IN_W-th compute edge, i.e. the
//   edge IN_W clocks after the accepting one; y_out is valid while out_valid is
//   high (it is the accumulator, which changes during the next computation).
//   A new sample can be taken in the out_valid clock, so the filter accepts one
//   sample every IN_W+1 clocks.
module fir_da #(
  parameter int                      TAPS   = fir_pkg::TAPS,
  parameter int                      IN_W   = fir_pkg::IN_W,
  parameter int                      COEF_W = fir_pkg::COEF_W,
  parameter logic [TAPS*COEF_W-1:0] COEF   = fir_pkg::COEFS,
  parameter int                      LUT_W  = COEF_W + $clog2(TAPS),
  parameter int                      OUT_W  = LUT_W + IN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out
);

  localparam int CNT_W = $clog2(IN_W);

  logic [IN_W-1:0]  sreg [TAPS];   // sreg[k] holds x[n-k], rotated by the bit count
  logic             busy;
  logic [CNT_W-1:0] cnt;           // bit being processed
  logic             last_bit;
  logic [TAPS-1:0]  addr;
  logic signed [LUT_W-1:0] lut_data;
  logic signed [OUT_W-1:0] acc;

  assign in_ready = !busy;
  assign last_bit = (cnt == CNT_W'(IN_W - 1));

  always_comb begin
    for (int k = 0; k < TAPS; k++) addr[k] = sreg[k][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < TAPS; k++) sreg[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        for (int k = 0; k < TAPS; k++) sreg[k] <= {sreg[k][0], sreg[k][IN_W-1:1]};
        cnt <= cnt + 1'b1;
        if (last_bit) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
      end else if (in_valid) begin
        sreg[0] <= x_in;
        for (int k = 1; k < TAPS; k++) sreg[k] <= sreg[k-1];
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end

  da_lut #(.TAPS(TAPS), .COEF_W(COEF_W), .LUT_W(LUT_W), .COEF(COEF)) u_lut (
    .addr(addr),
    .data(lut_data)
  );

  shift_add #(.DIN_W(LUT_W), .ACC_W(OUT_W)) u_shift_add (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (busy),
    .first(busy && cnt == '0),
    .sub  (last_bit),
    .din  (lut_data),
    .acc  (acc)
  );

  assign y_out = acc;

endmodule
