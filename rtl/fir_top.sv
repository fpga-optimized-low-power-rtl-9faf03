// fir_top: one 6-tap FIR filter realised in five structures side by side.
//
// The same input sample stream drives
//   - fir_direct      direct form (tapped delay line + adder tree)
//   - fir_transposed  transposed form (partial sums in the delay line)
//   - fir_symmetric   symmetric form (pre-adders, half the multipliers)
//   - fir_da          distributed arithmetic (one look-up table, bit-serial
//                     shift-and-add)
//   - fir_mac         one conventional pipelined multiply-accumulate unit
// All share the coefficient set of fir_pkg, so all five produce the same output
// sequence; they differ only in area and speed. The first four are the filter
// structures described; the MAC filter is the conventional sum-of-products
// reference the DA structure is compared with.
//
// Number format: following the filter described, samples and results cross the
// ports in fixed-point sign-magnitude form (MSB = sign, 1 = negative; the other
// bits the magnitude), so x_in spans -127..127. sm_to_tc converts each sample
// to two's complement, the form in which all five structures compute, and
// tc_to_sm converts each result back; the conversions are combinational.
//
// Interface: a sample x_in is taken on a clock edge with in_valid && in_ready.
// The two sequential structures need several clocks per sample, so in_ready is
// low until both can take a new sample (every max(IN_W+1, TAPS+3) = 9 clocks at
// the default sizes); the three parallel structures are enabled by the same
// accept strobe, so every structure sees the same samples. Each structure has
// its own output strobe: the parallel ones register their result on the
// accepting edge itself (one clock from input to output), DA sets its strobe
// IN_W clocks after the accepting edge and MAC TAPS+2 clocks after it. The outputs of DA and MAC are valid only while their strobe is high.
module fir_top #(
  parameter int                      TAPS   = fir_pkg::TAPS,
  parameter int                      IN_W   = fir_pkg::IN_W,
  parameter int                      COEF_W = fir_pkg::COEF_W,
  parameter logic [TAPS*COEF_W-1:0] COEF   = fir_pkg::COEFS,
  parameter int                      OUT_W  = IN_W + COEF_W + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic        [IN_W-1:0]  x_in,           // sign-magnitude sample

  output logic                    direct_valid,
  output logic        [OUT_W-1:0] direct_y,       // sign-magnitude results
  output logic                    transposed_valid,
  output logic        [OUT_W-1:0] transposed_y,
  output logic                    symmetric_valid,
  output logic        [OUT_W-1:0] symmetric_y,
  output logic                    da_valid,
  output logic        [OUT_W-1:0] da_y,
  output logic                    mac_valid,
  output logic        [OUT_W-1:0] mac_y
);

  localparam int NS = 5;   // number of structures

  logic da_ready, mac_ready, accept;
  logic signed [IN_W-1:0]  x_tc;
  logic signed [OUT_W-1:0] y_tc [NS];
  logic        [OUT_W-1:0] y_sm [NS];

  sm_to_tc #(.W(IN_W)) u_in_conv (.sm(x_in), .tc(x_tc));

  for (genvar i = 0; i < NS; i++) begin : g_out_conv
    tc_to_sm #(.W(OUT_W)) u_out_conv (.tc(y_tc[i]), .sm(y_sm[i]));
  end

  assign direct_y     = y_sm[0];
  assign transposed_y = y_sm[1];
  assign symmetric_y  = y_sm[2];
  assign da_y         = y_sm[3];
  assign mac_y        = y_sm[4];

  assign in_ready = da_ready && mac_ready;
  assign accept   = in_valid && in_ready;

  fir_direct #(.TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .COEF(COEF), .OUT_W(OUT_W)) u_direct (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .x_in(x_tc),
    .out_valid(direct_valid), .y_out(y_tc[0])
  );

  fir_transposed #(.TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .COEF(COEF), .OUT_W(OUT_W)) u_transposed (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .x_in(x_tc),
    .out_valid(transposed_valid), .y_out(y_tc[1])
  );

  fir_symmetric #(.TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .COEF(COEF), .OUT_W(OUT_W)) u_symmetric (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .x_in(x_tc),
    .out_valid(symmetric_valid), .y_out(y_tc[2])
  );

  fir_da #(.TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .COEF(COEF),
           .LUT_W(OUT_W - IN_W), .OUT_W(OUT_W)) u_da (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .in_ready(da_ready), .x_in(x_tc),
    .out_valid(da_valid), .y_out(y_tc[3])
  );

  fir_mac #(.TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .COEF(COEF), .OUT_W(OUT_W)) u_mac (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .in_ready(mac_ready), .x_in(x_tc),
    .out_valid(mac_valid), .y_out(y_tc[4])
  );

  // Handshake rule for the sample source: a sample offered while the filters
  // are busy stays offered, unchanged, until it is taken.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            in_valid && !in_ready |=> in_valid && $stable(x_in))
    else $error("fir_top: sample withdrawn or changed before it was accepted");

endmodule
