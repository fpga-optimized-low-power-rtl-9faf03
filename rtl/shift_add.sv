// shift_add: the shift-and-add accumulator of the distributed-arithmetic FIR.
//
// Built, as the filter description prescribes, from an n-bit adder (nbit_adder) and
// a PIPO register (pipo_reg). Each enabled clock the register takes
//     acc <= (acc >>> 1) +/- (din << (ACC_W - DIN_W - 1))
// i.e. the stored value is shifted one bit right and the next partial sum from
// the look-up table is added at the top. With first=1 the old value is ignored
// (taken as zero), which starts a new sum without a separate clear cycle; with
// sub=1 the partial sum is subtracted instead (used for the sign bit of
// two's-complement samples). After W steps fed LSB first, acc holds
// sum_b L_b*2^b (with the last step subtracted) exactly, provided
// ACC_W = DIN_W + W: no bit is lost to the right shifts.
//
// Timing: one step per clock with en=1; acc is the register output.
module shift_add #(
  parameter int DIN_W = 11,
  parameter int ACC_W = 19
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic                    sub,
  input  logic signed [DIN_W-1:0] din,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] shifted;
  logic signed [ACC_W-1:0] addend;
  logic signed [ACC_W-1:0] sum;
  logic        [ACC_W-1:0] acc_q;

  assign acc = $signed(acc_q);

  always_comb begin
    if (first) shifted = '0;
    else       shifted = acc >>> 1;
    addend  = ACC_W'(din) <<< (ACC_W - DIN_W - 1);
  end

  nbit_adder #(.N(ACC_W)) u_adder (
    .a  (shifted),
    .b  (addend),
    .sub(sub),
    .s  (sum)
  );

  pipo_reg #(.N(ACC_W)) u_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (1'b0),
    .load (en),
    .d    (sum),
    .q    (acc_q)
  );

endmodule
