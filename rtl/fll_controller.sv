// fll_controller: frequency comparator and integral control law of the FLL.
//
// Once per sampling period the sensor delivers a count M_k (meas, with a
// one-cycle meas_valid strobe). The comparator forms the error against the set
// point, e = set_point - M_k, where set_point is the target frequency already
// expressed in sensor counts (Ks*fr). The integral controller then updates the
// DCO word:  u_k = u_{k-1} + K*e.
//
// Arithmetic: K (k_gain) is unsigned with FRAC_W fractional bits. The
// accumulator holds the DCO word with FRAC_W fractional bits as well, so small
// errors are integrated over several samples instead of being truncated away;
// the DCO word u is the integer part of the accumulator. The accumulator
// saturates at 0 and at 255 + (2^FRAC_W-1)/2^FRAC_W so the 8-bit DCO word never
// wraps (sat_lo / sat_hi flag an update that was clipped).
//
// Timing: acc, u and err are registered on the clk edge where meas_valid is
// high, i.e. one clock after the sensor's count is available. Between strobes
// everything holds. rst_n (asynchronous, active low) loads ACC_INIT.
//
// The comparator and the integral law follow the FLL description; the
// fixed-point format, the retained fraction, the saturation and the reset value
// are this design's choices.
module fll_controller
  import fll_pkg::*;
#(
  parameter int unsigned U_BITS    = U_W,
  parameter int unsigned MEAS_BITS = MEAS_W,
  parameter int unsigned K_BITS    = K_W,
  parameter int unsigned FRAC_BITS = FRAC_W,
  parameter logic [U_BITS+FRAC_BITS-1:0] ACC_INIT = '0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [MEAS_BITS-1:0]        set_point,  // Ks*fr in counts
  input  logic [K_BITS-1:0]           k_gain,     // K, FRAC_BITS fractional bits
  input  logic                        meas_valid, // one strobe per sample
  input  logic [MEAS_BITS-1:0]        meas,       // M_k
  output logic [U_BITS-1:0]           u,          // DCO control word u_k
  output logic signed [MEAS_BITS:0]   err,        // last error used
  output logic                        sat_hi,     // last update clipped at top
  output logic                        sat_lo      // last update clipped at 0
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned ACC_W  = U_BITS + FRAC_BITS;
  localparam int unsigned PROD_W = MEAS_BITS + K_BITS + 2;
  localparam int unsigned SUM_W  = ((PROD_W > ACC_W + 1) ? PROD_W : ACC_W + 1) + 1;

  logic [ACC_W-1:0]          acc;
  logic signed [MEAS_BITS:0] e_now;
  logic signed [PROD_W-1:0]  prod;
  logic signed [SUM_W-1:0]   sum;
  logic signed [SUM_W-1:0]   acc_max;

  // comparator
  assign e_now = $signed({1'b0, set_point}) - $signed({1'b0, meas});

  // integral law with saturation
  always_comb begin
    prod    = PROD_W'(e_now) * $signed({1'b0, k_gain});
    sum     = $signed({{(SUM_W-ACC_W){1'b0}}, acc}) + SUM_W'(prod);
    acc_max = $signed({{(SUM_W-ACC_W){1'b0}}, {ACC_W{1'b1}}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= ACC_INIT;
      err    <= '0;
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end else if (meas_valid) begin
      err    <= e_now;
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
      if (sum < 0) begin
        acc    <= '0;
        sat_lo <= 1'b1;
      end else if (sum > acc_max) begin
        acc    <= '1;
        sat_hi <= 1'b1;
      end else begin
        acc    <= sum[ACC_W-1:0];
      end
    end
  end

  assign u = acc[ACC_W-1:FRAC_BITS];
endmodule
