// da_lut: look-up table of the distributed-arithmetic FIR.
//
// For a TAPS-bit address a (bit k = one bit of the sample that meets
// coefficient k), the table returns L(a) = sum over k of a[k] * h(k), the sum of
// the coefficients selected by the address. With constant coefficients all
// 2^TAPS entries are fixed, so the table is computed here at elaboration from the
// COEF parameter: one constant per entry, then a read by address. A single
// table serves all taps, as in the filter described. The read is combinational
// (an FPGA distributed ROM); LUT_W holds any sum of TAPS coefficients.
module da_lut #(
  parameter int                      TAPS   = fir_pkg::TAPS,
  parameter int                      COEF_W = fir_pkg::COEF_W,
  parameter int                      LUT_W  = COEF_W + $clog2(TAPS),
  parameter logic [TAPS*COEF_W-1:0] COEF   = fir_pkg::COEFS
) (
  input  logic        [TAPS-1:0]  addr,
  output logic signed [LUT_W-1:0] data
);

  localparam int DEPTH = 2 ** TAPS;

  // Entry value: the sum of the coefficients whose address bit is set.
  function automatic logic signed [LUT_W-1:0] entry(int a);
    logic signed [LUT_W-1:0] s;
    s = '0;
    for (int k = 0; k < TAPS; k++) begin
      if (((a >> k) & 1) != 0) s += LUT_W'($signed(COEF[k*COEF_W +: COEF_W]));
    end
    return s;
  endfunction

  logic signed [LUT_W-1:0] rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    localparam logic signed [LUT_W-1:0] VALUE = entry(a);
    assign rom[a] = VALUE;
  end

  assign data = rom[addr];

endmodule
