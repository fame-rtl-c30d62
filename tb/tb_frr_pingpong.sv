`timescale 1ns / 1ps
// tb_frr_pingpong: drives a ping-pong FRR with random data and random freeze
// periods and compares both shadows, bufsel and the valid shadow with a
// reference kept in the testbench. A directed sequence first replays the
// fault scenario: value B loaded in C_b, faulty value F in C_f, freeze from
// C_a on; the valid output must then be B for as long as the freeze lasts.
module tb_frr_pingpong;
  localparam int W = 16;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [W-1:0] d = '0;
  logic         freeze = 1'b0;
  logic [W-1:0] sr0, sr1, valid;
  logic         bufsel;
  int           checks = 0, failures = 0;

  logic [W-1:0] r_sr [2];
  bit           r_last;

  frr_pingpong #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .d(d), .freeze(freeze),
    .sr0(sr0), .sr1(sr1), .bufsel(bufsel), .valid(valid)
  );

  always #8 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $realtime, what);
    end
  endtask

  task automatic step(input logic [W-1:0] v, input bit f);
    d = v;
    freeze = f;
    @(posedge clk);
    if (!f) begin
      r_last = ~r_last;
      r_sr[r_last] = v;
    end
    #1;
    check(sr0 == r_sr[0], "sr0");
    check(sr1 == r_sr[1], "sr1");
    check(bufsel == r_last, "bufsel");
    check(valid == r_sr[~r_last], "valid");
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_sr[0] = '0;
    r_sr[1] = '0;
    r_last  = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    step(16'h1111, 0);
    step(16'h2222, 0);
    step(16'hB0B0, 0);         // C_b
    step(16'hFFFF, 0);         // C_f (faulty)
    for (int i = 0; i < 5; i++) begin
      step(16'($urandom), 1);       // frozen from C_a
      check(valid == 16'hB0B0, "pre-fault value kept");
    end
    for (int i = 0; i < 4000; i++)
      step(16'($urandom), ($urandom_range(0, 3) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
