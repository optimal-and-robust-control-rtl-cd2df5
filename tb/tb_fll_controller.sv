// tb_fll_controller: self-checking test of the comparator and integral law.
//
// Part 1 replays a recorded lock transient: set point 200 counts, K = 50/128,
// accumulator starting at DCO word 52 with a fractional residue, and the sensor
// counts 50, 108, 144, ... 200. The expected DCO words 111, 147, 169, ... 203
// and errors 150, 92, ... 0 are the values of that recording.
// Part 2 applies random counts, set points and gains with random gaps between
// strobes and compares u, err and the saturation flags with an integer model
// of the law computed here. Every update is checked one clock after its strobe,
// and the outputs are checked to hold between strobes.
module tb_fll_controller;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned ACC0 = 52 * 128 + 100;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [7:0]        set_point, k_gain, meas;
  logic              meas_valid;
  logic [7:0]        u;
  logic signed [8:0] err;
  logic              sat_hi, sat_lo;
  int checks = 0, failures = 0;

  fll_controller #(.ACC_INIT(15'(ACC0))) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (u=%0d err=%0d hi=%0b lo=%0b)", what, u, err, sat_hi, sat_lo);
    end
  endtask

  // one controller update: strobe for a cycle, outputs valid after the edge
  task automatic update(input logic [7:0] m);
    @(negedge clk);
    meas = m; meas_valid = 1'b1;
    @(negedge clk);
    meas_valid = 1'b0;
  endtask

  int unsigned fig_meas[11] = '{50, 108, 144, 166, 179, 186, 192, 195, 197, 198, 200};
  int unsigned fig_u[11]    = '{111, 147, 169, 182, 190, 196, 199, 201, 202, 203, 203};
  int          fig_e[11]    = '{150, 92, 56, 34, 21, 14, 8, 5, 3, 2, 0};

  int acc_ref, e_ref, gap;
  bit hi_ref, lo_ref;
  logic [7:0] u_hold;

  initial begin
    rst_n = 1'b0; meas_valid = 1'b0; meas = '0; set_point = 8'd200; k_gain = 8'b0011_0010;
    repeat (3) @(negedge clk);
    check(u == 8'd52, "reset value");
    rst_n = 1'b1;

    // ---- part 1: recorded transient ----
    for (int i = 0; i < 11; i++) begin
      update(8'(fig_meas[i]));
      check(u == 8'(fig_u[i]) && err == 9'(fig_e[i]),
            $sformatf("transient step %0d: want u=%0d e=%0d", i, fig_u[i], fig_e[i]));
    end

    // ---- part 2: random, against an integer model ----
    acc_ref = int'(dut.acc);
    for (int n = 0; n < 2000; n++) begin
      if (n % 50 == 0) set_point = 8'($urandom);
      if (n % 97 == 0) k_gain = (n % 3 == 0) ? 8'($urandom) : 8'b0011_0010;
      meas = 8'($urandom);
      if (n % 7 == 0) meas = set_point + 8'($urandom_range(0, 3)) - 8'd1;
      e_ref = int'(set_point) - int'(meas);
      acc_ref = acc_ref + e_ref * int'(k_gain);
      hi_ref = 1'b0; lo_ref = 1'b0;
      if (acc_ref < 0)          begin acc_ref = 0;     lo_ref = 1'b1; end
      else if (acc_ref > 32767) begin acc_ref = 32767; hi_ref = 1'b1; end
      update(meas);
      check(u == 8'(acc_ref >> 7) && int'(err) == e_ref && sat_hi == hi_ref && sat_lo == lo_ref,
            $sformatf("random update %0d: want u=%0d e=%0d hi=%0b lo=%0b",
                      n, acc_ref >> 7, e_ref, hi_ref, lo_ref));
      // hold between strobes
      u_hold = u;
      gap = $urandom_range(0, 4);
      meas = 8'($urandom);
      repeat (gap) @(negedge clk);
      check(u == u_hold, "hold between strobes");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
