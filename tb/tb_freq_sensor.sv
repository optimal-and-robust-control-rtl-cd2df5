// tb_freq_sensor: self-checking test of the counter-based frequency sensor.
//
// A 500 MHz control clock and a test oscillator of programmable frequency drive
// the sensor at its default sizes (60 ns period, 50 ns window). For each test
// frequency the expected count is 50 * f[GHz] (one edge of tolerance for the
// window phase); above 255 counts the output must clip and flag overflow, and
// a stopped oscillator must read 0. The strobe must come exactly every 30
// control cycles, and the count after a frequency change must describe the
// window that follows the change, i.e. arrive one sampling period late.
module tb_freq_sensor;
  timeunit 1ns; timeprecision 1fs;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       dco_clk = 1'b0;
  logic [7:0] meas;
  logic       meas_valid, meas_ovf, sample_start;
  int checks = 0, failures = 0;
  real f_test = 1.0;   // GHz, 0 = stopped

  freq_sensor dut (.*);

  always #1 clk = ~clk;

  always begin
    if (f_test <= 0.0) begin dco_clk = 1'b0; #0.5; end
    else begin #(0.5 / f_test); dco_clk = ~dco_clk; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (meas=%0d ovf=%0b)", what, meas, meas_ovf);
    end
  endtask

  // strobe spacing
  int cyc = 0, last_strobe = -1, strobes = 0;
  always @(posedge clk) begin
    cyc++;
    if (meas_valid) begin
      if (last_strobe >= 0) begin
        checks++;
        if (cyc - last_strobe != 30) begin
          failures++;
          $display("FAIL strobe spacing %0d", cyc - last_strobe);
        end
      end
      last_strobe = cyc;
      strobes++;
    end
  end

  real freqs[8] = '{1.0, 2.17, 4.0, 0.3, 5.0, 6.0, 0.0, 3.33};

  task automatic wait_strobe();
    @(posedge clk iff meas_valid);
    @(negedge clk);
  endtask

  int expected;

  initial begin
    rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) wait_strobe();
    foreach (freqs[i]) begin
      // change frequency at a period start; check the second count after it
      @(posedge clk iff sample_start);
      f_test = freqs[i];
      wait_strobe();
      wait_strobe();
      expected = int'(50.0 * freqs[i]);
      if (expected > 255)
        check(meas == 8'hff && meas_ovf, $sformatf("overflow at %0.2f GHz", freqs[i]));
      else
        check(!meas_ovf && int'(meas) >= expected - 1 && int'(meas) <= expected + 1,
              $sformatf("count at %0.2f GHz, want %0d", freqs[i], expected));
    end

    // one-sample delay: change frequency just after the count strobe; the next
    // strobe covers a window run entirely at the new frequency.
    f_test = 1.0;
    repeat (2) wait_strobe();
    check(int'(meas) >= 49 && int'(meas) <= 51, "delay test base count");
    f_test = 4.0;     // now: cycle after the strobe, before next window start
    wait_strobe();
    check(int'(meas) >= 199 && int'(meas) <= 201, "count of the next window after a change");

    check(strobes > 20, "strobes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
