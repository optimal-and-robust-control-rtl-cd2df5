// fll_top: small-area frequency-locked loop (FLL) for one voltage/frequency island.
//
// Loop: the 8-bit word u drives the DCO (dco_model); the sensor (freq_sensor)
// counts raw DCO edges during a 50 ns window of every 60 ns sampling period; the
// controller (fll_controller) compares the count with the set point and
// integrates the error with gain K, u_k = u_{k-1} + K*(set_point - M_k). The
// sensor's count reaches the controller one sample late, which is the delay the
// gain was tuned for. The usable output clock is the raw oscillation divided by
// two (clk_div2).
//
// Interface: clk is the control clock (500 MHz: 30 cycles make one 60 ns
// sample); set_point is the target frequency in sensor counts (50 counts per
// GHz of raw DCO frequency with the default window); k_gain is K with 7
// fractional bits, 8'b0011_0010 for the optimal gain; w_mhz is the disturbance
// input of the oscillator model. u, meas, err and the flags are observation
// outputs. Both set_point and k_gain may change at any time; they are used at
// the next controller update.
//
// The DCO here is a behavioural model, so this top is for simulation; for an
// implementation the dco_model instance is replaced by the oscillator macro with
// the same ports (without w_mhz). The loop structure, the 8-bit word, the gain,
// the one-sample sensor delay and the 60 ns sampling period follow the FLL
// description; the control clock, the window length and the fixed-point
// formats are this design's choices.
module fll_top
  import fll_pkg::*;
#(
  parameter int unsigned SAMPLE_CYC = SAMPLE_DIV,
  parameter int unsigned WINDOW_CYC = WINDOW_DIV,
  parameter real         KDCO_GHZ   = 19.83e-3,   // oscillator corner (syst 1)
  parameter real         B_GHZ      = -0.0315
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [MEAS_W-1:0]       set_point,   // Ks*fr, counts
  input  logic [K_W-1:0]          k_gain,      // K
  input  logic signed [15:0]      w_mhz,       // DCO disturbance (model only)
  output logic                    clk_out,     // FLL output clock, raw/2
  output logic                    dco_raw,     // raw oscillation
  output logic [U_W-1:0]          u,           // DCO word u_k
  output logic [MEAS_W-1:0]       meas,        // sensor count M_k
  output logic                    meas_valid,  // one strobe per sample
  output logic                    meas_ovf,    // sensor count clipped
  output logic signed [MEAS_W:0]  err,         // last error
  output logic                    sat_hi,      // u clipped at 255
  output logic                    sat_lo       // u clipped at 0
);
  timeunit 1ns; timeprecision 1ps;

  logic sample_start;

  dco_model #(
    .KDCO_GHZ (KDCO_GHZ),
    .B_GHZ    (B_GHZ)
  ) u_dco (
    .u       (u),
    .w_mhz   (w_mhz),
    .dco_raw (dco_raw)
  );

  clk_div2 u_div (
    .clk_in  (dco_raw),
    .rst_n   (rst_n),
    .clk_out (clk_out)
  );

  freq_sensor #(
    .SAMPLE_CYC (SAMPLE_CYC),
    .WINDOW_CYC (WINDOW_CYC)
  ) u_sensor (
    .clk          (clk),
    .rst_n        (rst_n),
    .dco_clk      (dco_raw),
    .meas         (meas),
    .meas_valid   (meas_valid),
    .meas_ovf     (meas_ovf),
    .sample_start (sample_start)
  );

  fll_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .set_point  (set_point),
    .k_gain     (k_gain),
    .meas_valid (meas_valid),
    .meas       (meas),
    .u          (u),
    .err        (err),
    .sat_hi     (sat_hi),
    .sat_lo     (sat_lo)
  );

  // The controller must never update inside a counting window: a window has to
  // see a single DCO word. (meas_valid is low during reset.)
  a_update_outside_window: assert property (
    @(posedge clk) meas_valid |-> !sample_start
  ) else $error("fll_top: controller update at window start");
endmodule
