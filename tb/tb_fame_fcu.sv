`timescale 1ns / 1ps
// tb_fame_fcu: drives the fault control unit with random alarm and trap
// handler completion pulses (plus a directed opening sequence) and compares
// every cycle with a reference of the two-mode machine: nominal -> safe on
// alarm, safe -> safe (restart) on alarm, safe -> nominal on completion
// without alarm, completion ignored in nominal mode. trap, wr_block and
// frr_freeze are checked in the alarm cycle itself; the mode one edge later.
module tb_fame_fcu;
  import fame_pkg::*;

  logic       clk = 1'b0;
  logic         rst_n = 1'b1;
  logic       alarm = 1'b0, th_done = 1'b0;
  fame_mode_e mode;
  logic       trap, th_restart, wr_block, frr_freeze;
  int         checks = 0, failures = 0;
  int         n_enter = 0, n_restart = 0, n_exit = 0, n_ignored = 0;
  bit         ref_safe = 1'b0;

  fame_fcu dut (
    .clk(clk), .rst_n(rst_n), .alarm(alarm), .th_done(th_done), .mode(mode),
    .trap(trap), .th_restart(th_restart), .wr_block(wr_block), .frr_freeze(frr_freeze)
  );

  always #8 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $realtime, what);
    end
  endtask

  // Apply one cycle of inputs, check combinational outputs, then the edge.
  task automatic step(input bit a, input bit d);
    @(negedge clk);
    alarm = a;
    th_done = d;
    #1;
    check((mode == MODE_SAFE) == ref_safe, "mode");
    check(trap == a, "trap");
    check(wr_block == a, "wr_block");
    check(th_restart == (a && ref_safe), "th_restart");
    check(frr_freeze == (a || ref_safe), "frr_freeze");
    if (a && !ref_safe) n_enter++;
    if (a && ref_safe) n_restart++;
    if (!a && d && ref_safe) n_exit++;
    if (!a && d && !ref_safe) n_ignored++;
    if (a) ref_safe = 1'b1;
    else if (d) ref_safe = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    step(0, 0);
    step(0, 1);      // completion in nominal mode: ignored
    step(1, 0);      // fault: enter safe mode
    step(0, 0);
    step(1, 0);      // second fault in safe mode: restart
    step(1, 1);      // fault together with completion: stay safe
    step(0, 1);      // clean completion: back to nominal
    step(0, 0);
    for (int i = 0; i < 3000; i++)
      step(($urandom_range(0, 9) == 0), ($urandom_range(0, 4) == 0));
    @(negedge clk);
    check(n_enter > 0 && n_restart > 0 && n_exit > 0 && n_ignored > 0, "coverage");
    $display("enter=%0d restart=%0d exit=%0d ignored=%0d", n_enter, n_restart, n_exit, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
