`timescale 1ns / 1ps
// frr_pingpong: ping-pong shadow pair of one pipeline register (a Fault
// Response Register).
//
// The shadows take the same value the pipeline register takes (d, the output
// of stage i), but only one of them per clock edge, alternately. So after any
// edge one shadow holds the value loaded at that edge and the other the value
// loaded one edge earlier. A fault in cycle C_f can therefore corrupt only the
// shadow written at the end of C_f; the one written at the end of C_b keeps
// the pre-fault value. While freeze is high neither shadow nor the select
// changes.
//
// Interface: d (value entering the pipeline register), freeze, sr0/sr1 (the
// shadows), bufsel (index of the shadow written at the most recent unfrozen
// edge; when frozen after a fault this is the shadow written in C_f, so
// bufsel = 1 means shadow 0 holds the valid value), valid (the other shadow).
// Timing: one register stage, same edge as the pipeline register.
// The alternating update and freeze follow the design description; what the
// software-visible bufsel bit means is this implementation's reading of it,
// chosen to agree with the handler rule "bufsel = 1: use shadow register 0".
module frr_pingpong #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         freeze,
  output logic [W-1:0] sr0,
  output logic [W-1:0] sr1,
  output logic         bufsel,
  output logic [W-1:0] valid
);

  logic         last_q;   // shadow written at the last unfrozen edge
  logic         sel_now;  // shadow written at the coming edge
  logic [W-1:0] sr0_q, sr1_q;

  assign sel_now = ~last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= 1'b1;
      sr0_q  <= '0;
      sr1_q  <= '0;
    end else if (!freeze) begin
      last_q <= sel_now;
      if (sel_now) sr1_q <= d;
      else         sr0_q <= d;
    end
  end

  assign sr0    = sr0_q;
  assign sr1    = sr1_q;
  assign bufsel = last_q;
  assign valid  = last_q ? sr0_q : sr1_q;

endmodule
