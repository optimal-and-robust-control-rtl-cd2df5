// tb_dco_model: checks the oscillator model's frequency law.
//
// For a set of input words and disturbances, the raw output is timed over 40
// periods and the measured frequency compared with B + KDCO*u + w within 0.5%.
// Also checked: the output stops (no edges) when the law gives a frequency
// below the stop threshold, and restarts when the word rises again.
module tb_dco_model;
  timeunit 1ns; timeprecision 1fs;

  logic [7:0]         u;
  logic signed [15:0] w_mhz;
  logic               dco_raw;
  int checks = 0, failures = 0;

  dco_model dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  real t0, t1, f_meas, f_want;
  int  words[6] = '{203, 52, 111, 255, 40, 128};
  int  dists[3] = '{0, 300, -500};
  int  edges;

  initial begin
    u = 8'd100; w_mhz = '0;
    #20;
    foreach (words[i]) foreach (dists[j]) begin
      u = 8'(words[i]); w_mhz = 16'(dists[j]);
      repeat (3) @(posedge dco_raw);
      t0 = $realtime;
      repeat (40) @(posedge dco_raw);
      t1 = $realtime;
      f_meas = 40.0 / (t1 - t0);
      f_want = -0.0315 + 19.83e-3 * real'(words[i]) + real'(dists[j]) / 1000.0;
      check(f_meas > f_want * 0.995 && f_meas < f_want * 1.005,
            $sformatf("u=%0d w=%0d: %f GHz, want %f", words[i], dists[j], f_meas, f_want));
    end
    // stopped oscillator: u = 0 gives a negative frequency at this corner
    u = 8'd0; w_mhz = '0;
    #20;
    edges = 0;
    fork
      begin : cnt forever begin @(posedge dco_raw); edges++; end end
      #100;
    join_any
    disable fork;
    check(edges == 0 && dco_raw == 1'b0, "stopped at u=0");
    u = 8'd50;
    #20;
    check(dut.f_ghz > 0.9, "restart");
    repeat (2) @(posedge dco_raw);
    check(1'b1, "edges after restart");
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
