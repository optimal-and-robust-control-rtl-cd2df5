// freq_sensor: counter-based frequency sensor with a one-sample delay.
//
// The sensor measures the raw DCO frequency as the number of DCO rising edges
// in a fixed window of WINDOW_DIV control-clock cycles, once per sampling period
// of SAMPLE_DIV cycles. The count delivered after sample k describes the DCO
// during sample k, so the controller sees it one sampling period late
// (M_k = Ks*f_{k-1}); Ks = window length in ns counts per GHz.
//
// How it works: a free-running CNT_BITS counter runs on the DCO clock and is
// kept in Gray code, so the control clock can sample it through a two-flop
// synchronizer without ever seeing a torn value. In the control domain the
// synchronized value is turned back to binary; it is captured at the start of
// the window (cycle 0) and subtracted from the value at the end (cycle
// WINDOW_DIV). The difference, modulo 2^CNT_BITS, is the edge count; counts
// above 2^MEAS_BITS-1 are clipped and flagged with meas_ovf. The cycles after
// the window leave time for the controller to apply its new word before the
// next window starts, so every window sees a single DCO word.
//
// Interface: meas / meas_ovf are registered and valid from the strobe
// meas_valid (one control-clock cycle, every SAMPLE_DIV cycles) until the next
// strobe. sample_start pulses in cycle 0 of each period.
//
// The counter-as-sensor and its one-sample delay follow the FLL description;
// the Gray-code crossing, the window placement within the period and the
// clipping are this design's choices. The DCO-domain reset synchronizer
// (dco_rst_sync) is, as any reset synchronizer, a flop chain whose output is
// used as an asynchronous reset; a lint note about that mixed use is expected.
module freq_sensor
  import fll_pkg::*;
#(
  parameter int unsigned SAMPLE_CYC = SAMPLE_DIV, // control cycles per sample
  parameter int unsigned WINDOW_CYC = WINDOW_DIV, // control cycles counted
  parameter int unsigned CNT_BITS   = CNT_W,
  parameter int unsigned MEAS_BITS  = MEAS_W
) (
  input  logic                 clk,          // control clock
  input  logic                 rst_n,        // asynchronous, active low
  input  logic                 dco_clk,      // raw DCO oscillation
  output logic [MEAS_BITS-1:0] meas,         // edge count of the last window
  output logic                 meas_valid,   // strobe: new meas
  output logic                 meas_ovf,     // last count was clipped
  output logic                 sample_start  // first cycle of a period
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned TMR_W = $clog2(SAMPLE_CYC);

  // ---------------- DCO domain: free-running Gray counter ----------------
  logic [1:0]          dco_rst_sync;
  logic                dco_rst_n;      // reset, released synchronously to dco_clk
  logic [CNT_BITS-1:0] dco_bin, dco_bin_next, dco_gray;

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) dco_rst_sync <= '0;
    else        dco_rst_sync <= {dco_rst_sync[0], 1'b1};
  end

  assign dco_rst_n    = dco_rst_sync[1];
  assign dco_bin_next = dco_bin + 1'b1;

  always_ff @(posedge dco_clk or negedge dco_rst_n) begin
    if (!dco_rst_n) begin
      dco_bin  <= '0;
      dco_gray <= '0;
    end else begin
      dco_bin  <= dco_bin_next;
      dco_gray <= dco_bin_next ^ (dco_bin_next >> 1);
    end
  end

  // ---------------- control domain ----------------
  logic [CNT_BITS-1:0] gray_s1, gray_s2, bin_now, bin_start, diff;
  logic [TMR_W-1:0]    tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gray_s1 <= '0;
      gray_s2 <= '0;
    end else begin
      gray_s1 <= dco_gray;
      gray_s2 <= gray_s1;
    end
  end

  // Gray to binary: each bit is the XOR of all Gray bits at and above it
  always_comb begin
    bin_now[CNT_BITS-1] = gray_s2[CNT_BITS-1];
    for (int i = int'(CNT_BITS) - 2; i >= 0; i--)
      bin_now[i] = bin_now[i+1] ^ gray_s2[i];
  end

  assign diff         = bin_now - bin_start;
  assign sample_start = (tmr == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr        <= '0;
      bin_start  <= '0;
      meas       <= '0;
      meas_valid <= 1'b0;
      meas_ovf   <= 1'b0;
    end else begin
      tmr        <= (tmr == TMR_W'(SAMPLE_CYC - 1)) ? '0 : tmr + 1'b1;
      meas_valid <= 1'b0;
      if (tmr == '0)
        bin_start <= bin_now;
      if (tmr == TMR_W'(WINDOW_CYC)) begin
        meas_valid <= 1'b1;
        if (diff > CNT_BITS'({MEAS_BITS{1'b1}})) begin
          meas     <= '1;
          meas_ovf <= 1'b1;
        end else begin
          meas     <= diff[MEAS_BITS-1:0];
          meas_ovf <= 1'b0;
        end
      end
    end
  end

  initial begin
    assert (WINDOW_CYC > 0 && WINDOW_CYC < SAMPLE_CYC)
      else $error("freq_sensor: WINDOW_CYC must lie inside the sampling period");
    assert (CNT_BITS > MEAS_BITS)
      else $error("freq_sensor: CNT_BITS must exceed MEAS_BITS");
  end
endmodule
