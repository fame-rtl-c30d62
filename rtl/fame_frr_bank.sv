`timescale 1ns / 1ps
// fame_frr_bank: the Fault Response Registers of the prototype and their
// software interface.
//
// One ping-pong shadow pair captures, at every unfrozen clock edge, (a) the
// register-file write (enable, index, data) entering the write-back stage
// register, (b) the PSR flags written with it and (c) the address of the
// instruction entering the exception stage. After a fault in cycle C_f the
// pair is frozen (from the alarm cycle C_a until the trap handler completes),
// and the shadow not written in C_f holds the state of C_b: the last correct
// register write and the address to resume at.
//
// Software view (read with RDASR, combinational):
//   %asr20 / %asr21  shadow 0 / 1: [4:0] index, [5] write enable,
//                    [9:6] icc, [31] frozen bufsel (same bit in both)
//   %asr22 / %asr23  shadow 0 / 1: register write data
// A WRASR of a register index to %asr22 (%asr23) in safe mode restores that
// register with shadow 0's (1's) write data, if that shadow recorded a write,
// and the PSR flags with the shadow's icc. resume_pc is the valid shadow's
// instruction address, written by hardware to %l1 when the trap is taken.
// Timing: restore requests are combinational from the WRASR write port.
// The ASR numbers, the index mask and the restore-by-WRASR protocol follow the
// design description; the bit packing of %asr20/21, restoring the flags with
// the same WRASR and gating restores to safe mode are this implementation's
// choices.
module fame_frr_bank
  import fame_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 freeze,
  input  logic                 safe,
  // Values entering the W-stage and X-stage pipeline registers
  input  rf_wr_t               xw_wr,
  input  logic [ICC_W-1:0]     xw_icc,
  input  logic [XLEN-1:0]      mx_pc,
  // RDASR port
  input  logic [4:0]           asr_rd_addr,
  output logic                 asr_rd_hit,
  output logic [XLEN-1:0]      asr_rd_data,
  // WRASR port
  input  logic                 asr_wr_en,
  input  logic [4:0]           asr_wr_addr,
  input  logic [XLEN-1:0]      asr_wr_data,
  // Restore requests
  output rf_wr_t               rst_wr,
  output logic                 rst_icc_we,
  output logic [ICC_W-1:0]     rst_icc,
  // Resume address for %l1 and the frozen select
  output logic [XLEN-1:0]      resume_pc,
  output logic                 bufsel
);

  frr_entry_t d_ent, sr0, sr1, valid;

  assign d_ent = '{wb: xw_wr, icc: xw_icc, pc: mx_pc};

  frr_pingpong #(.W(FRR_W)) u_pp (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (d_ent),
    .freeze (freeze),
    .sr0    (sr0),
    .sr1    (sr1),
    .bufsel (bufsel),
    .valid  (valid)
  );

  assign resume_pc = valid.pc;

  function automatic logic [XLEN-1:0] ctl_word(frr_entry_t e, logic sel);
    logic [XLEN-1:0] w;
    w = '0;
    w[CTL_IDX_LSB +: RF_ADDR_W] = e.wb.addr;
    w[CTL_WE_BIT]               = e.wb.we;
    w[CTL_ICC_LSB +: ICC_W]     = e.icc;
    w[CTL_BUFSEL]               = sel;
    return w;
  endfunction

  always_comb begin
    asr_rd_hit  = 1'b1;
    asr_rd_data = '0;
    unique case (asr_rd_addr)
      ASR_FRR0_CTL:  asr_rd_data = ctl_word(sr0, bufsel);
      ASR_FRR1_CTL:  asr_rd_data = ctl_word(sr1, bufsel);
      ASR_FRR0_DATA: asr_rd_data = sr0.wb.data;
      ASR_FRR1_DATA: asr_rd_data = sr1.wb.data;
      default:       asr_rd_hit  = 1'b0;
    endcase
  end

  logic       wr0, wr1;
  frr_entry_t src;

  assign wr0 = safe && asr_wr_en && (asr_wr_addr == ASR_FRR0_DATA);
  assign wr1 = safe && asr_wr_en && (asr_wr_addr == ASR_FRR1_DATA);
  assign src = wr1 ? sr1 : sr0;

  always_comb begin
    rst_wr.we   = (wr0 || wr1) && src.wb.we;
    rst_wr.addr = asr_wr_data[RF_ADDR_W-1:0];
    rst_wr.data = src.wb.data;
    rst_icc_we  = wr0 || wr1;
    rst_icc     = src.icc;
  end

endmodule
