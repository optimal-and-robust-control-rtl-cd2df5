// clk_div2: divide-by-two of the raw DCO oscillation.
//
// The ring oscillator's raw waveform does not have a usable duty cycle, so the
// FLL output clock is taken after a divide-by-two toggle flip-flop, which gives
// exactly 50% duty at half the raw frequency. The flip-flop toggles on every
// rising edge of clk_in; rst_n clears it asynchronously (clk_out low).
// The divider follows the oscillator description; the reset is this design's
// own choice.
module clk_div2 (
  input  logic clk_in,   // raw DCO oscillation
  input  logic rst_n,    // asynchronous, active low
  output logic clk_out   // clk_in / 2, 50% duty
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end
endmodule
