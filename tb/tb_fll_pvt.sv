// tb_fll_pvt: the loop across three oscillator corners, with disturbances.
//
// Three FLLs with the same controller and gain run side by side on the corners
//   syst 1: 19.83 MHz/LSB, offset -31.5 MHz
//   syst 2: 14.25 MHz/LSB, offset 4578.5 MHz
//   syst 3: 25.50 MHz/LSB, offset 2078.5 MHz
// For each one a set-point step inside its reachable range is applied (1 -> 4
// GHz for syst 1, 2.2 -> 4 GHz for syst 3, 4.7 -> 5.0 GHz for syst 2, whose
// lowest frequency is above 4 GHz). The count must never overshoot and must
// enter the 5% band within n95 + 2 samples, where n95 is the number of samples
// for the loop error (1 - g)^n to fall below 5% with loop gain
// g = K * 50 counts/GHz * KDCO, computed here from the corner values. Then
// +/-500 MHz disturbance pulses of 3 samples are applied (the rejection test):
// the loop must come back to within 1 count in n95 + 6 samples. Finally syst 2
// is asked for 4 GHz, below its range: u must pin at 0 with the count at the
// corner's minimum frequency.
module tb_fll_pvt;
  timeunit 1ns; timeprecision 1ps;
  import fll_pkg::*;

  localparam int NS = 3;
  localparam real KD[NS] = '{19.83e-3, 14.25e-3, 25.50e-3};
  localparam real BB[NS] = '{-0.0315, 4.5785, 2.0785};

  logic clk = 1'b0, rst_n;
  logic [7:0]         set_point[NS], u[NS], meas[NS];
  logic signed [15:0] w_mhz[NS];
  logic signed [8:0]  err[NS];
  logic               clk_out[NS], dco_raw[NS], meas_valid[NS], meas_ovf[NS];
  logic               sat_hi[NS], sat_lo[NS];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NS; g++) begin : g_sys
    fll_top #(.KDCO_GHZ(KD[g]), .B_GHZ(BB[g])) dut (
      .clk, .rst_n, .set_point(set_point[g]), .k_gain(K_OPT), .w_mhz(w_mhz[g]),
      .clk_out(clk_out[g]), .dco_raw(dco_raw[g]), .u(u[g]), .meas(meas[g]),
      .meas_valid(meas_valid[g]), .meas_ovf(meas_ovf[g]), .err(err[g]),
      .sat_hi(sat_hi[g]), .sat_lo(sat_lo[g]));
  end

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic next_sample();
    @(posedge clk iff meas_valid[0]);
    @(negedge clk);
    @(negedge clk);
  endtask

  function automatic int n95(input int s);
    real g = (50.0 / 128.0) * 50.0 * KD[s];
    return int'($ceil($ln(0.05) / $ln(1.0 - g)));
  endfunction

  function automatic int counts(input real ghz);
    return int'(50.0 * ghz);
  endfunction

  int lo[NS] = '{counts(1.0), counts(4.7), counts(2.2)};
  int hi[NS] = '{counts(4.0), counts(5.0), counts(4.0)};
  int first95[NS], maxm[NS], back[NS];
  int errv;

  initial begin
    rst_n = 1'b0;
    for (int s = 0; s < NS; s++) begin set_point[s] = 8'(lo[s]); w_mhz[s] = '0; end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (60) next_sample();
    for (int s = 0; s < NS; s++)
      check(err[s] >= -1 && err[s] <= 1, $sformatf("syst %0d locked at %0d counts", s + 1, lo[s]));

    // set-point steps, all systems at once
    @(posedge clk iff meas_valid[0]);
    for (int s = 0; s < NS; s++) begin
      set_point[s] = 8'(hi[s]); first95[s] = -1; maxm[s] = 0;
    end
    next_sample();
    for (int i = 1; i <= 30; i++) begin
      next_sample();
      for (int s = 0; s < NS; s++) begin
        if (first95[s] < 0 && (hi[s] - int'(meas[s])) * 20 <= (hi[s] - lo[s])) first95[s] = i;
        if (int'(meas[s]) > maxm[s]) maxm[s] = int'(meas[s]);
      end
    end
    for (int s = 0; s < NS; s++) begin
      $display("syst %0d: %0d -> %0d counts, 5%% band after %0d samples (bound %0d), peak %0d, u=%0d",
               s + 1, lo[s], hi[s], first95[s], n95(s) + 2, maxm[s], u[s]);
      check(first95[s] > 0 && first95[s] <= n95(s) + 2, $sformatf("syst %0d response time", s + 1));
      check(maxm[s] <= hi[s] + 1, $sformatf("syst %0d no overshoot", s + 1));
      check(err[s] >= -1 && err[s] <= 1, $sformatf("syst %0d static error", s + 1));
    end

    // disturbance pulses, +500 MHz then -500 MHz, three samples each
    foreach (back[s]) back[s] = 0;
    for (int p = 0; p < 2; p++) begin
      for (int s = 0; s < NS; s++) w_mhz[s] = (p == 0) ? 16'sd500 : -16'sd500;
      repeat (3) next_sample();
      for (int s = 0; s < NS; s++) begin
        errv = int'(set_point[s]) - int'(meas[s]);
        check((p == 0) ? errv < -3 : errv > 3, $sformatf("syst %0d pulse %0d visible", s + 1, p));
        w_mhz[s] = '0;
      end
      for (int s = 0; s < NS; s++) back[s] = -1;
      for (int i = 1; i <= 20; i++) begin
        next_sample();
        for (int s = 0; s < NS; s++)
          if (back[s] < 0 && err[s] >= -1 && err[s] <= 1) back[s] = i;
      end
      for (int s = 0; s < NS; s++) begin
        check(back[s] > 0 && back[s] <= n95(s) + 6, $sformatf("syst %0d rejects pulse %0d (%0d samples)", s + 1, p, back[s]));
        check(err[s] >= -1 && err[s] <= 1, $sformatf("syst %0d settled after pulse %0d", s + 1, p));
      end
    end

    // syst 2 asked for 4 GHz: below its range
    set_point[1] = 8'(counts(4.0));
    repeat (40) next_sample();
    check(u[1] == 8'd0 && sat_lo[1], "syst 2 pins u at 0 for 4 GHz");
    check(int'(meas[1]) >= counts(4.5785) - 1 && int'(meas[1]) <= counts(4.5785) + 1,
          "syst 2 runs at its minimum frequency");

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
