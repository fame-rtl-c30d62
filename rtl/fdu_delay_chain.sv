`timescale 1ns / 1ps
// fdu_delay_chain: behavioural model (not synthesizable logic) of the buffer
// chain of the fault detection unit.
//
// In silicon this is a chain of buffers sized so that its propagation delay
// T_delay is slightly greater than the critical path of the processor (found
// by worst-case static timing analysis). Its logic function is y = a; what
// matters is the delay. It is modelled as N_BUF buffers in series, each with
// delay T_DELAY_NS / N_BUF: like real buffers, a pulse longer than one
// buffer delay travels down the chain intact, a shorter one is swallowed.
//
// Interface: a (input), y (output). Timing: y(t) = a(t - T_DELAY_NS) for any
// input whose pulses are longer than T_DELAY_NS / N_BUF.
// The delay value and the number of buffers are this implementation's
// choices: the design description only requires T_delay > T_critical; 15 ns
// sits just below the 16 ns clock period of the 62.5 MHz prototype.
module fdu_delay_chain #(
  parameter real         T_DELAY_NS = 15.0,
  parameter int unsigned N_BUF      = 15
) (
  input  logic a,
  output logic y
);

  localparam real T_BUF_NS = T_DELAY_NS / N_BUF;

  logic node [N_BUF+1];

  initial for (int i = 1; i <= N_BUF; i++) node[i] = 1'b0;

  always_comb node[0] = a;

  for (genvar i = 0; i < N_BUF; i++) begin : g_buf
    always @(node[i]) node[i+1] <= #(T_BUF_NS) node[i];
  end

  assign y = node[N_BUF];

endmodule
