// fll_pkg: widths and constants shared by the FLL blocks.
//
// The DCO control word is 8 bits wide (0..255) as the oscillator is specified.
// The controller gain K is an unsigned 8-bit fixed-point number with 7
// fractional bits; the default 8'b0011_0010 = 50/128 = 0.3906 is the closest
// 8-bit value to the optimal gain K = 0.392. The frequency measurement is an
// 8-bit count, enough for the 5 GHz maximum sensor input at 50 counts per GHz
// (250 counts). The integral accumulator keeps the same 7 fractional bits as K.
package fll_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned U_W    = 8;  // DCO input word
  localparam int unsigned MEAS_W = 8;  // sensor count and set point
  localparam int unsigned K_W    = 8;  // controller gain word
  localparam int unsigned FRAC_W = 7;  // fractional bits of K and of the accumulator

  localparam logic [K_W-1:0] K_OPT = 8'b0011_0010;  // 0.390625 ~ K = 0.392

  // Sampling: a 500 MHz control clock, 30 cycles = 60 ns per sample, of which
  // the first 25 cycles (50 ns) are the counting window: 50 counts per GHz.
  localparam int unsigned SAMPLE_DIV = 30;
  localparam int unsigned WINDOW_DIV = 25;
  localparam int unsigned CNT_W      = 10; // free-running DCO-domain counter
endpackage
