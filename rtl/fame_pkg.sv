`timescale 1ns / 1ps
// fame_pkg: types and constants shared by the FAME (fault-attack aware
// microprocessor extensions) blocks.
//
// One Fault Response Register (FRR) entry holds what a trap handler needs to
// undo the effect of a fault on a 32-bit SPARC-style pipeline: the register
// file write of the write-back (W) stage (enable, register index, data), the
// PSR condition flags written with it, and the address of the instruction in
// the exception (X) stage. The ancillary state register (ASR) numbers 20..23
// and the 5-bit register index (mask 0x1f in the handler) follow the design
// description; the icc width, the bit packing of %asr20/%asr21 and the %l1
// register number are this implementation's choices.
package fame_pkg;

  parameter int unsigned XLEN      = 32;  // 32-bit processor
  parameter int unsigned RF_ADDR_W = 5;   // register index, masked with 0x1f
  parameter int unsigned ICC_W     = 4;   // PSR flags field: N Z V C

  // Ancillary state registers that expose the FRRs to software.
  parameter logic [4:0] ASR_FRR0_CTL  = 5'd20;  // shadow 0: index, we, icc, bufsel
  parameter logic [4:0] ASR_FRR1_CTL  = 5'd21;  // shadow 1: index, we, icc, bufsel
  parameter logic [4:0] ASR_FRR0_DATA = 5'd22;  // shadow 0: write data; WRASR = restore
  parameter logic [4:0] ASR_FRR1_DATA = 5'd23;  // shadow 1: write data; WRASR = restore

  // %l1 is r17 of the trap window: receives the resume address.
  parameter logic [RF_ADDR_W-1:0] REG_L1 = 5'd17;

  // Bit positions inside %asr20 / %asr21.
  parameter int unsigned CTL_IDX_LSB = 0;   // [4:0]  register index
  parameter int unsigned CTL_WE_BIT  = 5;   // [5]    write enable
  parameter int unsigned CTL_ICC_LSB = 6;   // [9:6]  PSR icc
  parameter int unsigned CTL_BUFSEL  = 31;  // [31]   frozen bufsel

  typedef enum logic {
    MODE_NOMINAL = 1'b0,
    MODE_SAFE    = 1'b1
  } fame_mode_e;

  // Register-file write request of one W-stage instruction.
  typedef struct packed {
    logic                 we;
    logic [RF_ADDR_W-1:0] addr;
    logic [XLEN-1:0]      data;
  } rf_wr_t;

  // Content of one FRR shadow register.
  typedef struct packed {
    rf_wr_t           wb;   // (a) W-stage register file write
    logic [ICC_W-1:0] icc;  // (b) PSR flags
    logic [XLEN-1:0]  pc;   // (c) address of the X-stage instruction
  } frr_entry_t;

  parameter int unsigned FRR_W = $bits(frr_entry_t);

endpackage
