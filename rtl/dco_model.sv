// dco_model: behavioural model of the digitally-controlled oscillator (DCO).
// This is a simulation model, not synthesizable logic: the real DCO is a
// standard-cell ring oscillator whose circuit is not part of this RTL.
//
// The oscillator is modelled as linear in its 8-bit input word:
//     f = B_GHZ + KDCO_GHZ * u + w_mhz / 1000      [GHz, raw oscillation]
// where KDCO_GHZ and B_GHZ set the process/voltage/temperature corner and
// w_mhz is an additive disturbance (the B_w*w term) driven by a testbench.
// The defaults are the "syst 1" corner (19.83 MHz/LSB, -31.5 MHz offset).
// The output dco_raw is the raw oscillation; its duty cycle is 50% here, but
// the FLL still divides it by two (clk_div2) as the real oscillator requires.
//
// Timing: a change of u or w_mhz takes effect at the next half period. When
// the model frequency falls below FMIN_GHZ the oscillator stops (output low)
// and re-evaluates its input every STOP_POLL_NS. The linear law and the corner
// values follow the oscillator characterisation; the stop behaviour and the
// disturbance port in MHz are this model's choices. The half-period delay is
// computed at run time; it is never zero because the frequency is at least
// FMIN_GHZ whenever the oscillator runs (a lint note about a possibly zero
// delay is expected).
module dco_model #(
  parameter real KDCO_GHZ     = 19.83e-3, // GHz per LSB
  parameter real B_GHZ        = -0.0315,  // GHz offset
  parameter real FMIN_GHZ     = 0.05,     // below this the model stops
  parameter real STOP_POLL_NS = 1.0
) (
  input  logic [7:0]         u,       // DCO control word
  input  logic signed [15:0] w_mhz,   // disturbance, MHz
  output logic               dco_raw  // raw oscillation
);
  timeunit 1ns; timeprecision 1fs;

  real f_ghz;

  always_comb f_ghz = B_GHZ + KDCO_GHZ * real'(u) + real'(w_mhz) / 1000.0;

  initial dco_raw = 1'b0;

  always begin
    if (f_ghz < FMIN_GHZ) begin
      dco_raw = 1'b0;
      #(STOP_POLL_NS);
    end else begin
      #(0.5 / f_ghz);
      dco_raw = ~dco_raw;
    end
  end
endmodule
