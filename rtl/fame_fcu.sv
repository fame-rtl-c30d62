`timescale 1ns / 1ps
// fame_fcu: Fault Control Unit, the two-state machine that runs the secure
// trap.
//
// In nominal mode the application runs. When the FDU raises alarm, the FCU in
// that same cycle (C_a) blocks register-file and data-cache writes, freezes the
// Fault Response Registers and requests a non-maskable trap; at the next clock
// edge the pipeline is annulled, fetch is redirected to the trap handler and
// the mode becomes safe. An alarm during safe mode restarts the trap handler
// and keeps safe mode, so safe mode can only be left by a handler run that was
// not disturbed. The handler's completion (its return-from-trap retiring,
// th_done) brings the processor back to nominal mode; if alarm and th_done
// coincide, the alarm wins.
//
// Interface: alarm from the FDU, th_done from the pipeline (only honoured in
// safe mode). Outputs: trap (annul all stages and fetch the first handler
// instruction at the next edge; also writes the resume address to %l1),
// th_restart (the trap is a restart in safe mode), wr_block (kill this cycle's
// RF/PSR and D-cache writes), frr_freeze (hold the FRR shadows), mode.
// Timing: trap, wr_block and frr_freeze follow alarm combinationally; mode
// changes one edge later. The two modes and their transitions follow the
// design description; the alarm-over-completion priority and the reset state
// (nominal) are this implementation's choices.
module fame_fcu
  import fame_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       alarm,
  input  logic       th_done,
  output fame_mode_e mode,
  output logic       trap,
  output logic       th_restart,
  output logic       wr_block,
  output logic       frr_freeze
);

  fame_mode_e mode_q, mode_d;

  always_comb begin
    mode_d = mode_q;
    unique case (mode_q)
      MODE_NOMINAL: if (alarm)   mode_d = MODE_SAFE;
      MODE_SAFE:    if (alarm)   mode_d = MODE_SAFE;     // restart handler
                    else if (th_done) mode_d = MODE_NOMINAL;
      default:      mode_d = MODE_SAFE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= MODE_NOMINAL;
    else        mode_q <= mode_d;
  end

  assign mode       = mode_q;
  assign trap       = alarm;
  assign th_restart = alarm && (mode_q == MODE_SAFE);
  assign wr_block   = alarm;
  // Shadows stay frozen from the alarm cycle until the handler completes.
  assign frr_freeze = alarm || (mode_q == MODE_SAFE);

// Every alarm ends in safe mode at the next edge.
  a_alarm_to_safe: assert property (@(posedge clk) disable iff (!rst_n)
    alarm |=> mode_q == MODE_SAFE)
    else $error("fame_fcu: alarm did not lead to safe mode");

endmodule
