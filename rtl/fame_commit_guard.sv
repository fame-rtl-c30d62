`timescale 1ns / 1ps
// fame_commit_guard: gate between the pipeline and the software-visible state
// (register file, PSR flags, data cache).
//
// In the alarm cycle C_a the write-back stage and the memory stage may carry
// results computed in the glitched cycle, so their register-file, PSR and
// data-cache writes are dropped. The register-file port is then free and is
// used by hardware to write the resume address into %l1 of the trap handler.
// In safe mode a restore requested through the FRRs takes the register-file
// port (and the PSR flags) in place of the pipeline's write.
//
// Interface: pipe_* are the write requests of the W stage (register file,
// flags) and the M stage (data cache); wr_block and trap come from the FCU;
// rst_* from the FRR bank; the outputs go to the register file, the PSR and
// the data cache. Timing: purely combinational.
// Blocking the writes and writing %l1 follow the design description; the
// priority (%l1 write, then restore, then pipeline) is this implementation's
// choice.
module fame_commit_guard
  import fame_pkg::*;
(
  input  rf_wr_t           pipe_rf,
  input  logic             pipe_icc_we,
  input  logic [ICC_W-1:0] pipe_icc,
  input  logic             pipe_dc_we,
  input  logic             wr_block,
  input  logic             trap,
  input  logic [XLEN-1:0]  resume_pc,
  input  rf_wr_t           rst_wr,
  input  logic             rst_icc_we,
  input  logic [ICC_W-1:0] rst_icc,
  output rf_wr_t           rf_wr,
  output logic             icc_we,
  output logic [ICC_W-1:0] icc,
  output logic             dc_we
);

  always_comb begin
    if (trap) begin
      rf_wr = '{we: 1'b1, addr: REG_L1, data: resume_pc};
    end else if (rst_wr.we) begin
      rf_wr = rst_wr;
    end else begin
      rf_wr    = pipe_rf;
      rf_wr.we = pipe_rf.we && !wr_block;
    end

    if (rst_icc_we && !wr_block) begin
      icc_we = 1'b1;
      icc    = rst_icc;
    end else begin
      icc_we = pipe_icc_we && !wr_block;
      icc    = pipe_icc;
    end

    dc_we = pipe_dc_we && !wr_block;
  end

endmodule
