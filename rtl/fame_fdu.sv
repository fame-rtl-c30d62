`timescale 1ns / 1ps
// fame_fdu: Fault Detection Unit for clock-glitch (setup-time violation)
// attacks.
//
// A toggle flip-flop inverts its value on every clock edge. Its output goes
// straight to the capture flip-flop and, through a delay chain slower than the
// processor's critical path, to the dummy flip-flop. With a normal clock period
// both see the new value before the next edge and hold equal values. When a
// glitch shortens a cycle below T_delay, the capture flip-flop takes the new
// value but the dummy flip-flop still sees the old one, and the XOR of the two
// raises alarm for the cycle that follows the glitched one (C_a).
//
// Interface: clk (the possibly glitched processor clock), rst_n (asynchronous,
// active low), alarm (combinational XOR of the two sampling flip-flops).
// Timing: alarm is high for one cycle, the cycle after each cycle shorter than
// T_delay. The structure (three flip-flops, NOT, delay chain, XOR) follows the
// design description; the reset values are this implementation's choice.
module fame_fdu #(
  parameter real T_DELAY_NS = 15.0
) (
  input  logic clk,
  input  logic rst_n,
  output logic alarm
);

  logic toggle_q;
  logic delayed;
  logic capture_q;
  logic dummy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) toggle_q <= 1'b0;
    else        toggle_q <= ~toggle_q;
  end

  fdu_delay_chain #(.T_DELAY_NS(T_DELAY_NS)) u_chain (
    .a (toggle_q),
    .y (delayed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      capture_q <= 1'b0;
      dummy_q   <= 1'b0;
    end else begin
      capture_q <= toggle_q;
      dummy_q   <= delayed;
    end
  end

  assign alarm = capture_q ^ dummy_q;

endmodule
