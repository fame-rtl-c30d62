`timescale 1ns / 1ps
// fame_top: the FAME hardware extensions of a 7-stage in-order processor
// (fetch, decode, register access, execute, memory, exception, write-back).
//
// The fault detection unit watches the processor clock and raises alarm in
// the cycle after a clock cycle too short for the critical path. The fault
// control unit turns the alarm into a secure trap: in the alarm cycle it
// blocks the register-file, PSR and data-cache writes and freezes the Fault
// Response Registers; at the next edge the host pipeline annuls all stages,
// fetches the first trap-handler instruction, and the processor is in safe
// mode. In that same alarm cycle the resume address from the FRRs is written
// to %l1. The handler reads the FRRs through RDASR %asr20..23, restores the
// last correct register write with WRASR %asr22/23 and returns (th_done),
// which brings the processor back to nominal mode. An alarm in safe mode
// restarts the handler.
//
// The host pipeline itself is not part of this design: its connections are
// the ports. xw_* is what enters the W-stage pipeline register, mx_pc the
// address entering the X-stage register, w_*/m_dc_we the write requests of
// the W and M stages, asr_* the RDASR/WRASR ports of the X stage, th_done the
// retirement of the handler's return-from-trap. trap means "annul every stage
// and fetch the trap handler at the next edge". rf_wr, icc_we/icc and dc_we
// are the gated writes to the register file, PSR and data cache.
module fame_top
  import fame_pkg::*;
#(
  parameter real T_DELAY_NS = 15.0
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the host pipeline
  input  rf_wr_t           xw_wr,
  input  logic [ICC_W-1:0] xw_icc,
  input  logic [XLEN-1:0]  mx_pc,
  input  rf_wr_t           w_rf,
  input  logic             w_icc_we,
  input  logic [ICC_W-1:0] w_icc,
  input  logic             m_dc_we,
  input  logic             th_done,
  input  logic [4:0]       asr_rd_addr,
  input  logic             asr_wr_en,
  input  logic [4:0]       asr_wr_addr,
  input  logic [XLEN-1:0]  asr_wr_data,
  // to the host pipeline
  output logic             alarm,
  output fame_mode_e       mode,
  output logic             trap,
  output logic             th_restart,
  output logic             asr_rd_hit,
  output logic [XLEN-1:0]  asr_rd_data,
  output logic             bufsel,
  // gated writes to the architectural state
  output rf_wr_t           rf_wr,
  output logic             icc_we,
  output logic [ICC_W-1:0] icc,
  output logic             dc_we
);

  logic             wr_block, frr_freeze;
  rf_wr_t           rst_wr;
  logic             rst_icc_we;
  logic [ICC_W-1:0] rst_icc;
  logic [XLEN-1:0]  resume_pc;

  fame_fdu #(.T_DELAY_NS(T_DELAY_NS)) u_fdu (
    .clk   (clk),
    .rst_n (rst_n),
    .alarm (alarm)
  );

  fame_fcu u_fcu (
    .clk        (clk),
    .rst_n      (rst_n),
    .alarm      (alarm),
    .th_done    (th_done),
    .mode       (mode),
    .trap       (trap),
    .th_restart (th_restart),
    .wr_block   (wr_block),
    .frr_freeze (frr_freeze)
  );

  fame_frr_bank u_frr (
    .clk         (clk),
    .rst_n       (rst_n),
    .freeze      (frr_freeze),
    .safe        (mode == MODE_SAFE),
    .xw_wr       (xw_wr),
    .xw_icc      (xw_icc),
    .mx_pc       (mx_pc),
    .asr_rd_addr (asr_rd_addr),
    .asr_rd_hit  (asr_rd_hit),
    .asr_rd_data (asr_rd_data),
    .asr_wr_en   (asr_wr_en),
    .asr_wr_addr (asr_wr_addr),
    .asr_wr_data (asr_wr_data),
    .rst_wr      (rst_wr),
    .rst_icc_we  (rst_icc_we),
    .rst_icc     (rst_icc),
    .resume_pc   (resume_pc),
    .bufsel      (bufsel)
  );

  fame_commit_guard u_guard (
    .pipe_rf     (w_rf),
    .pipe_icc_we (w_icc_we),
    .pipe_icc    (w_icc),
    .pipe_dc_we  (m_dc_we),
    .wr_block    (wr_block),
    .trap        (trap),
    .resume_pc   (resume_pc),
    .rst_wr      (rst_wr),
    .rst_icc_we  (rst_icc_we),
    .rst_icc     (rst_icc),
    .rf_wr       (rf_wr),
    .icc_we      (icc_we),
    .icc         (icc),
    .dc_we       (dc_we)
  );

endmodule
