`timescale 1ns / 1ps
// tb_fdu_delay_chain: checks that the delay-chain model passes every edge of
// its input, including pulses (1 to 31 ns) shorter than the whole delay,
// exactly T_DELAY_NS later: 0.2 ns before that time y still shows the old
// value, 0.2 ns after it the new one.
// Input edges are placed at random times; the expected output at each probe
// time is the input value T_DELAY_NS earlier, recorded by the testbench.
module tb_fdu_delay_chain;
  localparam real T = 15.0;

  logic a = 1'b0;
  logic y;
  int   checks = 0, failures = 0;

  fdu_delay_chain #(.T_DELAY_NS(T)) dut (.a(a), .y(y));

  // Each step holds a for a random length, then toggles it.
  real hold [64];
  bit  val  [64];

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t_probe, acc;
    // a changes at times acc_k; val[k] is the value after change k.
    for (int i = 0; i < 64; i++) begin
      hold[i] = 1.0 + real'($urandom_range(0, 3000)) / 100.0;  // 1 .. 31 ns
      val[i]  = (i % 2 == 0);
    end
    fork
      begin
        for (int i = 0; i < 64; i++) begin
          a = val[i];
          #(hold[i]);
        end
      end
      begin
        // Probe y just after each change of a plus T, and just before.
        acc = 0.0;
        for (int i = 0; i < 64; i++) begin
          // y at acc+T-0.2 should equal the value before change i
          t_probe = acc + T - 0.2;
          #(t_probe - $realtime);
          checks++;
          if (y !== (i == 0 ? 1'b0 : val[i-1])) begin
            failures++;
            $display("FAIL before edge %0d: y=%b", i, y);
          end
          #0.4;
          checks++;
          if (y !== val[i]) begin
            failures++;
            $display("FAIL after edge %0d: y=%b exp=%b", i, y, val[i]);
          end
          acc += hold[i];
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
