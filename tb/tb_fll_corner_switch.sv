// tb_fll_corner_switch: the loop locked at 4 GHz while the oscillator's
// characteristic changes under it and disturbance pulses hit it.
//
// One FLL (default syst 1 oscillator model) is locked at 200 counts (4 GHz
// raw). The testbench then moves the oscillator to another corner at run time
// by driving the model's disturbance input with the difference between the two
// linear laws at the current word:
//     w = (b_j + KDCO_j*u) - (b_1 + KDCO_1*u),
// so the DCO behaves exactly as corner j. The sequence is: syst 1 -> syst 3
// (4 GHz jumps to 7.3 GHz, the sensor saturates, the loop must come back to
// 200 counts from above without undershoot), a -500 MHz pulse, syst 3 -> syst 1
// (the frequency drops to 1.5 GHz, the loop must climb back without overshoot),
// a +500 MHz pulse, and syst 1 -> syst 2, whose lowest frequency (4.58 GHz) is
// above the set point: the word must pin at 0. Back at syst 1 the loop relocks.
// Each relock is checked against the settling bound of the corner's loop pole.
module tb_fll_corner_switch;
  timeunit 1ns; timeprecision 1ps;
  import fll_pkg::*;

  localparam real KD[3] = '{19.83e-3, 14.25e-3, 25.50e-3};
  localparam real BB[3] = '{-0.0315, 4.5785, 2.0785};

  logic              clk = 1'b0, rst_n;
  logic [7:0]        set_point, k_gain;
  logic signed [15:0] w_mhz;
  logic              clk_out, dco_raw, meas_valid, meas_ovf, sat_hi, sat_lo;
  logic [7:0]        u, meas;
  logic signed [8:0] err;
  int checks = 0, failures = 0;

  fll_top dut (.*);

  always #1 clk = ~clk;

  int  corner = 0;     // 0: syst 1, 1: syst 2, 2: syst 3
  int  pulse_mhz = 0;
  always_comb
    w_mhz = 16'($rtoi(1000.0 * ((BB[corner] + KD[corner] * real'(u))
                               - (BB[0] + KD[0] * real'(u)))) + pulse_mhz);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (u=%0d meas=%0d err=%0d)", what, u, meas, err);
    end
  endtask

  task automatic next_sample();
    @(posedge clk iff meas_valid);
    @(negedge clk);
    @(negedge clk);
  endtask

  function automatic int bound(input int s);
    real g = (50.0 / 128.0) * 50.0 * KD[s];
    return int'($ceil($ln(0.01) / $ln(1.0 - g))) + 6;
  endfunction

  // relock after a change: count samples to |err| <= 1, track extremes
  task automatic relock(input int s, input bit from_above, input string what);
    int n = 0, ext = 200;
    bit ok = 0;
    while (!ok && n < 60) begin
      next_sample();
      n++;
      if (from_above && int'(meas) < ext) ext = int'(meas);
      if (!from_above && int'(meas) > ext) ext = int'(meas);
      ok = (err >= -1 && err <= 1);
    end
    $display("%s: relocked after %0d samples (bound %0d), extreme count %0d", what, n, bound(s), ext);
    check(ok && n <= bound(s), {what, ": relock time"});
    check(from_above ? ext >= 199 : ext <= 201, {what, ": monotonic approach"});
    repeat (3) next_sample();
    check(err >= -1 && err <= 1, {what, ": stays locked"});
  endtask

  int n_ovf = 0;
  always @(posedge clk) if (meas_valid && meas_ovf) n_ovf++;

  initial begin
    rst_n = 1'b0; set_point = 8'd200; k_gain = K_OPT;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) next_sample();
    check(err >= -1 && err <= 1 && u >= 8'd202 && u <= 8'd204, "locked at 4 GHz, syst 1");

    corner = 2;
    next_sample();
    check(meas_ovf, "syst 3 jump saturates the sensor");
    relock(2, 1'b1, "syst 1 -> syst 3");
    check(u >= 8'd74 && u <= 8'd76, "word at 4 GHz, syst 3");

    pulse_mhz = -500;
    repeat (3) next_sample();
    check(err > 3, "-500 MHz pulse visible");
    pulse_mhz = 0;
    relock(2, 1'b1, "after -500 MHz pulse");

    corner = 0;
    next_sample();
    check(meas < 8'd100, "syst 3 -> syst 1 drop visible");
    relock(0, 1'b0, "syst 3 -> syst 1");

    pulse_mhz = 500;
    repeat (3) next_sample();
    check(err < -3, "+500 MHz pulse visible");
    pulse_mhz = 0;
    relock(0, 1'b0, "after +500 MHz pulse");

    corner = 1;
    repeat (40) next_sample();
    check(u == 8'd0 && sat_lo, "syst 2: 4 GHz below range, word pinned at 0");
    corner = 0;
    relock(0, 1'b0, "syst 2 -> syst 1");

    check(n_ovf > 0, "sensor overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
