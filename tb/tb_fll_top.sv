// tb_fll_top: end-to-end test of the FLL at its default sizes and corner.
//
// The loop is run through one complete operation and then pushed through every
// mechanism it has:
//   1. lock from reset to 1 GHz (50 counts), checked as |err| <= 1 for 4 samples;
//   2. a set-point step 1 GHz -> 4 GHz (50 -> 200 counts): each sensor count is
//      compared with the recorded transient 108, 144, 166, 179, 186, 192, ...
//      (2 counts tolerance), the count must enter the 5% band (>= 190) within 7
//      samples, never overshoot, and end within 1 count; the output clock must
//      then run at half the raw frequency, 2 GHz;
//   3. disturbance rejection: +300 MHz on the oscillator, relock;
//   4. sensor overflow: +2 GHz disturbance drives the count past 255, relock;
//   5. gain reprogramming at run time (K doubled), step and relock;
//   6. upper saturation: an unreachable set point pins u at 255;
//   7. set point 0 stops the oscillator; with a +500 MHz offset the set point
//      is below the lowest reachable frequency and u pins at 0.
// The strobe spacing (30 control cycles = 60 ns) is checked throughout, and
// each mechanism's occurrences are counted; one that never happened fails.
module tb_fll_top;
  timeunit 1ns; timeprecision 1ps;
  import fll_pkg::*;

  logic              clk = 1'b0, rst_n;
  logic [7:0]        set_point, k_gain;
  logic signed [15:0] w_mhz;
  logic              clk_out, dco_raw, meas_valid, meas_ovf, sat_hi, sat_lo;
  logic [7:0]        u, meas;
  logic signed [8:0] err;
  int checks = 0, failures = 0;

  fll_top dut (.*);

  always #1 clk = ~clk;   // 500 MHz control clock

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t u=%0d meas=%0d err=%0d)", what, $time, u, meas, err);
    end
  endtask

  // ---------------- monitors ----------------
  int cyc = 0, last_strobe = -1, n_strobe = 0;
  int n_ovf = 0, n_sat_hi = 0, n_sat_lo = 0, n_stopped = 0, n_locks = 0;
  int n_dist = 0, n_kchg = 0, n_steps = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && meas_valid) begin
      n_strobe++;
      if (last_strobe >= 0) begin
        checks++;
        if (cyc - last_strobe != 30) begin
          failures++;
          $display("FAIL strobe spacing %0d", cyc - last_strobe);
        end
      end
      last_strobe = cyc;
      if (meas_ovf) n_ovf++;
      if (meas == 0) n_stopped++;
    end
  end
  always @(posedge sat_hi) n_sat_hi++;
  always @(posedge sat_lo) n_sat_lo++;

  // wait for the next controller update; outputs are settled afterwards
  task automatic next_sample();
    @(posedge clk iff meas_valid);
    @(negedge clk);
    @(negedge clk);
  endtask

  // run until |err| <= 1 for 4 samples in a row
  task automatic wait_lock(input int max_samples, input string what);
    int good = 0, n = 0;
    while (good < 4 && n < max_samples) begin
      next_sample();
      n++;
      good = (err >= -1 && err <= 1) ? good + 1 : 0;
    end
    check(good == 4, {"lock: ", what});
    if (good == 4) n_locks++;
  endtask

  real t0, t1;
  int  fig_meas[9] = '{108, 144, 166, 179, 186, 192, 195, 197, 198};
  int  first95, maxm;

  initial begin
    rst_n = 1'b0; set_point = 8'd50; k_gain = K_OPT; w_mhz = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // 1. lock at 1 GHz
    wait_lock(60, "1 GHz");
    check(u >= 8'd51 && u <= 8'd53, "DCO word at 1 GHz");

    // 2. step to 4 GHz, compare with the recorded transient
    @(posedge clk iff meas_valid);
    set_point = 8'd200; n_steps++;
    next_sample();            // update uses the old window: error 150
    check(err >= 149 && err <= 151, "first error after the step");
    first95 = -1; maxm = 0;
    for (int i = 0; i < 20; i++) begin
      next_sample();
      if (i < 9)
        check(int'(meas) >= fig_meas[i] - 2 && int'(meas) <= fig_meas[i] + 2,
              $sformatf("transient sample %0d, want about %0d", i + 1, fig_meas[i]));
      if (first95 < 0 && meas >= 8'd190) first95 = i + 1;
      if (int'(meas) > maxm) maxm = int'(meas);
    end
    check(first95 > 0 && first95 <= 7, $sformatf("5%% band reached after %0d samples", first95));
    check(maxm <= 201, "no overshoot");
    check(err >= -1 && err <= 1, "static error at 4 GHz");
    check(u >= 8'd202 && u <= 8'd204, "DCO word at 4 GHz");
    // output clock: 40 periods at 2 GHz = 20 ns
    @(posedge clk_out); t0 = $realtime;
    repeat (40) @(posedge clk_out); t1 = $realtime;
    check((t1 - t0) > 19.6 && (t1 - t0) < 20.4, $sformatf("output clock period %f ns", (t1 - t0) / 40.0));

    // 3. disturbance rejection
    w_mhz = 16'sd300; n_dist++;
    next_sample(); next_sample();
    check(meas >= 8'd210, "disturbance visible in the count");
    wait_lock(30, "after +300 MHz disturbance");
    check(u < 8'd200, "controller compensated the disturbance");

    // 4. sensor overflow
    w_mhz = 16'sd2000; n_dist++;
    wait_lock(40, "after +2 GHz disturbance");
    w_mhz = '0;
    wait_lock(40, "disturbance removed");

    // 5. gain reprogrammed at run time
    k_gain = 8'b0110_0100; n_kchg++;
    set_point = 8'd100; n_steps++;
    wait_lock(40, "with doubled gain");
    k_gain = K_OPT; n_kchg++;

    // 6. upper saturation: 255 counts needs u > 255 at this corner
    set_point = 8'd255; n_steps++;
    repeat (30) next_sample();
    check(u == 8'd255 && sat_hi, "u pinned at 255");
    check(meas >= 8'd249 && meas <= 8'd252, "count at full scale");

    // 7. set point 0 stops the oscillator; a +500 MHz offset then makes even
    //    u = 0 too fast, so u must pin at 0
    set_point = 8'd0; n_steps++;
    repeat (40) next_sample();
    check(meas == 8'd0 && u <= 8'd4, "oscillator stopped");
    w_mhz = 16'sd500; n_dist++;
    repeat (10) next_sample();
    check(u == 8'd0 && sat_lo, "u pinned at 0");
    check(meas >= 8'd22 && meas <= 8'd25, "count at u = 0 with offset");
    w_mhz = '0;

    // back to a normal lock
    set_point = 8'd150; n_steps++;
    wait_lock(60, "3 GHz from standstill");

    // mechanism coverage
    $display("mechanisms: locks=%0d steps=%0d disturbances=%0d overflow=%0d sat_hi=%0d sat_lo=%0d stopped=%0d gain_changes=%0d strobes=%0d",
             n_locks, n_steps, n_dist, n_ovf, n_sat_hi, n_sat_lo, n_stopped, n_kchg, n_strobe);
    check(n_ovf > 0, "sensor overflow happened");
    check(n_sat_hi > 0, "upper saturation happened");
    check(n_sat_lo > 0, "lower saturation happened");
    check(n_stopped > 0, "stopped oscillator seen");
    check(n_dist > 0 && n_kchg > 0 && n_steps > 0 && n_locks >= 6, "steps, disturbances, gain changes, locks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
