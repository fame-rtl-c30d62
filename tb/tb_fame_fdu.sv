`timescale 1ns / 1ps
// tb_fame_fdu: drives the fault detection unit with a 16 ns (62.5 MHz) clock
// into which single short cycles are inserted, sweeping the short cycle from
// 16 ns down to about 5 ns in 162 ps steps (68 glitches). One nanosecond after
// every rising edge it checks alarm against a model worked out from the
// clock edges alone: the toggle value after reset is the parity of the edges
// seen so far, the capture flip-flop samples it just before an edge and the
// dummy flip-flop samples it as it was T_delay earlier, so alarm is high in a
// cycle exactly when an odd number of edges fell in the T_delay window before
// the edge that started it. For single glitches this is the cycle after any
// cycle shorter than T_delay; two glitches back to back give one alarm.
module tb_fame_fdu;
  localparam real T_CLK   = 16.0;
  localparam real T_DELAY = 15.0;

  logic clk = 1'b0;
  logic         rst_n = 1'b1;
  logic alarm;
  int   checks = 0, failures = 0;
  int   n_alarm = 0, n_expected = 0;
  real  edges[$];

  fame_fdu #(.T_DELAY_NS(T_DELAY)) dut (.clk(clk), .rst_n(rst_n), .alarm(alarm));

  task automatic cycle(input real len);
    bit exp_alarm;
    int n;
    real now;
    now = $realtime;
    n = 0;
    foreach (edges[i]) if (edges[i] > now - T_DELAY) n++;
    exp_alarm = rst_n && (n % 2 == 1);
    clk = 1'b1;
    if (rst_n) edges.push_back(now);
    #0.5;
    if (rst_n) begin
      checks++;
      if (alarm !== exp_alarm) begin
        failures++;
        $display("FAIL t=%0t alarm=%b exp=%b", $realtime, alarm, exp_alarm);
      end
      if (alarm) n_alarm++;
      if (exp_alarm) n_expected++;
    end
    #(len / 2.0 - 0.5);
    clk = 1'b0;
    #(len / 2.0);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real w;
    #1 rst_n = 1'b0;
    repeat (3) cycle(T_CLK);
    #1 rst_n = 1'b1;
    repeat (4) cycle(T_CLK);
    for (int g = 0; g < 68; g++) begin
      w = T_CLK - 0.162 * real'(g);
      cycle(w);
      repeat (3) cycle(T_CLK);
    end
    // Two glitches back to back.
    cycle(6.8);
    cycle(6.8);
    repeat (3) cycle(T_CLK);
    checks++;
    if (n_alarm != n_expected || n_expected != 62) begin
      failures++;
      $display("FAIL alarm count %0d expected %0d (62)", n_alarm, n_expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
