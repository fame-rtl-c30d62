`timescale 1ns / 1ps
// tb_fame_frr_bank: drives the FRR bank with random pipeline values, random
// freeze and safe-mode periods and random RDASR/WRASR accesses, and compares
// every output with a reference that keeps its own copy of the two shadows:
// the %asr20..23 read words (index, write enable, flags and bufsel packed as
// documented in the bank), the restore write produced by WRASR %asr22/23,
// and the resume address taken from the shadow not written last.
module tb_fame_frr_bank;
  import fame_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic             freeze = 1'b0, safe = 1'b0;
  rf_wr_t           xw_wr = '0;
  logic [ICC_W-1:0] xw_icc = '0;
  logic [XLEN-1:0]  mx_pc = '0;
  logic [4:0]       asr_rd_addr = '0;
  logic             asr_rd_hit;
  logic [XLEN-1:0]  asr_rd_data;
  logic             asr_wr_en = 1'b0;
  logic [4:0]       asr_wr_addr = '0;
  logic [XLEN-1:0]  asr_wr_data = '0;
  rf_wr_t           rst_wr;
  logic             rst_icc_we;
  logic [ICC_W-1:0] rst_icc;
  logic [XLEN-1:0]  resume_pc;
  logic             bufsel;
  int               checks = 0, failures = 0, n_restore = 0, n_read = 0;

  // Reference shadows
  rf_wr_t           r_wb  [2];
  logic [ICC_W-1:0] r_icc [2];
  logic [XLEN-1:0]  r_pc  [2];
  bit               r_last;

  fame_frr_bank dut (
    .clk(clk), .rst_n(rst_n), .freeze(freeze), .safe(safe),
    .xw_wr(xw_wr), .xw_icc(xw_icc), .mx_pc(mx_pc),
    .asr_rd_addr(asr_rd_addr), .asr_rd_hit(asr_rd_hit), .asr_rd_data(asr_rd_data),
    .asr_wr_en(asr_wr_en), .asr_wr_addr(asr_wr_addr), .asr_wr_data(asr_wr_data),
    .rst_wr(rst_wr), .rst_icc_we(rst_icc_we), .rst_icc(rst_icc),
    .resume_pc(resume_pc), .bufsel(bufsel)
  );

  always #8 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $realtime, what);
    end
  endtask

  function automatic logic [31:0] ctl(input int k);
    return {r_last, 21'd0, r_icc[k], r_wb[k].we, r_wb[k].addr};
  endfunction

  task automatic check_outputs();
    int k;
    bit hit, w0, w1;
    logic [31:0] exp_rd;
    hit = 1'b1;
    exp_rd = '0;
    case (asr_rd_addr)
      5'd20: exp_rd = ctl(0);
      5'd21: exp_rd = ctl(1);
      5'd22: exp_rd = r_wb[0].data;
      5'd23: exp_rd = r_wb[1].data;
      default: hit = 1'b0;
    endcase
    if (hit) n_read++;
    check(asr_rd_hit == hit, "asr_rd_hit");
    check(asr_rd_data == exp_rd, "asr_rd_data");
    check(bufsel == r_last, "bufsel");
    check(resume_pc == r_pc[r_last ? 0 : 1], "resume_pc");
    w0 = safe && asr_wr_en && asr_wr_addr == 5'd22;
    w1 = safe && asr_wr_en && asr_wr_addr == 5'd23;
    k  = w1 ? 1 : 0;
    check(rst_icc_we == (w0 || w1), "rst_icc_we");
    check(rst_wr.we == ((w0 || w1) && r_wb[k].we), "rst_wr.we");
    if (w0 || w1) begin
      n_restore++;
      check(rst_icc == r_icc[k], "rst_icc");
      check(rst_wr.addr == asr_wr_data[4:0], "rst_wr.addr");
      check(rst_wr.data == r_wb[k].data, "rst_wr.data");
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      r_wb[k] = '0;
      r_icc[k] = '0;
      r_pc[k] = '0;
    end
    r_last = 1'b1;
    #1 rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      xw_wr       = '{we: 1'($urandom), addr: 5'($urandom), data: $urandom};
      xw_icc      = 4'($urandom);
      mx_pc       = $urandom & 32'hffff_fffc;
      if ($urandom_range(0, 7) == 0) freeze = ~freeze;
      safe        = freeze && ($urandom_range(0, 3) != 0);
      asr_rd_addr = 5'($urandom_range(18, 25));
      asr_wr_en   = ($urandom_range(0, 2) == 0);
      asr_wr_addr = 5'($urandom_range(21, 24));
      asr_wr_data = $urandom;
      #1;
      check_outputs();
      @(posedge clk);
      if (!freeze) begin
        r_last = ~r_last;
        r_wb[r_last]  = xw_wr;
        r_icc[r_last] = xw_icc;
        r_pc[r_last]  = mx_pc;
      end
      @(negedge clk);
    end
    check(n_restore > 0 && n_read > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
