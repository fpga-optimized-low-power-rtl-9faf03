// fir_mac: FIR filter computed by one conventional MAC unit (pdsp_mac).
//
// This is the sum-of-products architecture the distributed-arithmetic filter is
// contrasted with: a programmable-DSP style datapath that forms
//     y[n] = sum_{k=0}^{TAPS-1} h(k+1) * x[n-k]
// one product per clock through a single pipelined multiplier and accumulator.
// A delay line of TAPS registers holds x[n]..x[n-TAPS+1]; a counter steps the
// tap index k and feeds x[n-k] and h(k+1) to the MAC.
//
// Interface: valid/ready sample input, output strobe.
//   x_in is taken on an edge where in_valid && in_ready; the next TAPS clocks
//   issue the products, and out_valid is high for one clock, set by the edge
//   TAPS+2 clocks after the accepting edge; y_out is valid while out_valid is
//   high (it is the accumulator, which changes during the next computation).
//   in_ready is low from the accepting edge until out_valid, and a new sample
//   can be taken in the out_valid clock, so one sample is taken every TAPS+3
//   clocks. The schedule is this design's choice.
module fir_mac #(
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
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out
);

  localparam int K_W = $clog2(TAPS);

  typedef enum logic [1:0] {IDLE, ISSUE, DRAIN} state_t;

  state_t                 state;
  logic [K_W-1:0]         k;
  logic signed [IN_W-1:0] hist [TAPS];   // hist[j] = x[n-j]
  logic signed [IN_W-1:0] mac_a;
  logic signed [COEF_W-1:0] mac_b;
  logic                   issue;
  logic                   done;

  assign in_ready  = (state == IDLE) || (state == DRAIN && done);
  assign issue     = (state == ISSUE);
  assign out_valid = done;

  always_comb begin
    mac_a = hist[0];
    mac_b = '0;
    for (int j = 0; j < TAPS; j++) begin
      if (k == K_W'(j)) begin
        mac_a = hist[j];
        mac_b = $signed(COEF[j*COEF_W +: COEF_W]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      k     <= '0;
      for (int j = 0; j < TAPS; j++) hist[j] <= '0;
    end else begin
      if (in_ready && in_valid) begin
        hist[0] <= x_in;
        for (int j = 1; j < TAPS; j++) hist[j] <= hist[j-1];
        k     <= '0;
        state <= ISSUE;
      end else begin
        unique case (state)
          IDLE:  ;
          ISSUE: begin
            k <= k + 1'b1;
            if (k == K_W'(TAPS - 1)) state <= DRAIN;
          end
          DRAIN: if (done) state <= IDLE;
          default: state <= IDLE;
        endcase
      end
    end
  end

  pdsp_mac #(.A_W(IN_W), .B_W(COEF_W), .ACC_W(OUT_W)) u_mac (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(issue),
    .first   (issue && k == '0),
    .last    (issue && k == K_W'(TAPS - 1)),
    .a       (mac_a),
    .b       (mac_b),
    .done    (done),
    .acc     (y_out)
  );

endmodule
