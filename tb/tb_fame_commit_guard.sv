`timescale 1ns / 1ps
// tb_fame_commit_guard: applies random combinations of pipeline writes, FCU
// signals and FRR restore requests to the commit guard and checks each
// output against the intended rules: in a trap cycle the register-file port
// writes the resume address to %l1 (r17) and every pipeline write is dropped;
// otherwise a restore takes the register-file port and the flags; otherwise
// the pipeline writes pass unless wr_block is high.
module tb_fame_commit_guard;
  import fame_pkg::*;

  rf_wr_t           pipe_rf = '0, rst_wr = '0, rf_wr;
  logic             pipe_icc_we = 1'b0, pipe_dc_we = 1'b0, wr_block = 1'b0, trap = 1'b0;
  logic             rst_icc_we = 1'b0, icc_we, dc_we;
  logic [ICC_W-1:0] pipe_icc = '0, rst_icc = '0, icc;
  logic [XLEN-1:0]  resume_pc = '0;
  int               checks = 0, failures = 0;
  int               n_l1 = 0, n_rst = 0, n_pass = 0, n_block = 0;

  fame_commit_guard dut (
    .pipe_rf(pipe_rf), .pipe_icc_we(pipe_icc_we), .pipe_icc(pipe_icc),
    .pipe_dc_we(pipe_dc_we), .wr_block(wr_block), .trap(trap), .resume_pc(resume_pc),
    .rst_wr(rst_wr), .rst_icc_we(rst_icc_we), .rst_icc(rst_icc),
    .rf_wr(rf_wr), .icc_we(icc_we), .icc(icc), .dc_we(dc_we)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $realtime, what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      pipe_rf     = '{we: 1'($urandom), addr: 5'($urandom), data: $urandom};
      pipe_icc_we = 1'($urandom);
      pipe_icc    = 4'($urandom);
      pipe_dc_we  = 1'($urandom);
      trap        = ($urandom_range(0, 5) == 0);
      wr_block    = trap;   // the FCU raises both together
      rst_wr      = '{we: ($urandom_range(0, 3) == 0), addr: 5'($urandom), data: $urandom};
      rst_icc_we  = rst_wr.we || ($urandom_range(0, 7) == 0);
      rst_icc     = 4'($urandom);
      resume_pc   = $urandom;
      #1;
      if (trap) begin
        n_l1++;
        check(rf_wr.we && rf_wr.addr == 5'd17 && rf_wr.data == resume_pc, "%l1 write");
        check(!icc_we, "flags blocked");
        check(!dc_we, "dcache blocked");
      end else begin
        if (rst_wr.we) begin
          n_rst++;
          check(rf_wr == rst_wr, "restore write");
        end else begin
          n_pass++;
          check(rf_wr.we == pipe_rf.we, "pipe we");
          if (pipe_rf.we) check(rf_wr.addr == pipe_rf.addr && rf_wr.data == pipe_rf.data, "pipe write");
        end
        if (rst_icc_we) check(icc_we && icc == rst_icc, "flags restore");
        else check(icc_we == pipe_icc_we && (!icc_we || icc == pipe_icc), "flags pass");
        check(dc_we == pipe_dc_we, "dcache pass");
      end
      #1;
    end
    // wr_block alone (no trap) must still stop pipeline writes.
    trap = 1'b0; wr_block = 1'b1; rst_wr = '0; rst_icc_we = 1'b0;
    pipe_rf = '{we: 1'b1, addr: 5'd3, data: 32'h1234}; pipe_icc_we = 1'b1; pipe_dc_we = 1'b1;
    #1;
    n_block++;
    check(!rf_wr.we && !icc_we && !dc_we, "blocked");
    check(n_l1 > 0 && n_rst > 0 && n_pass > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
