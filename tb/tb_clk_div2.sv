// tb_clk_div2: checks the divide-by-two output clock.
//
// Drives an irregular input clock and checks after every input rising edge that
// the output has toggled, that it holds on falling edges, that it starts low
// after reset, and that it is high for exactly one input period out of two.
module tb_clk_div2;
  timeunit 1ns; timeprecision 1ps;

  logic clk_in = 1'b0, rst_n, clk_out;
  int checks = 0, failures = 0;
  logic prev;
  int high_cnt = 0, rises = 0;

  clk_div2 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0;
    #3;
    check(clk_out == 1'b0, "reset value");
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < 200; i++) begin
      prev = clk_out;
      #($urandom_range(1, 5)) clk_in = 1'b1;
      #0.01;
      check(clk_out == ~prev, "toggle on rising edge");
      rises++;
      if (clk_out) high_cnt++;
      prev = clk_out;
      #($urandom_range(1, 5)) clk_in = 1'b0;
      #0.01;
      check(clk_out == prev, "hold on falling edge");
    end
    check(high_cnt * 2 == rises, "half of the input periods high");
    rst_n = 1'b0;
    #0.01;
    check(clk_out == 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
