`timescale 1ns / 1ps
// tb_fame_top: end-to-end run of the FAME extensions around a behavioural
// model of a 7-stage in-order pipeline (F D A E M X W), at the default
// parameters (16 ns clock, 15 ns delay chain).
//
// The user program is a chain of dependent register operations: instruction
// k reads r[rs] (forwarded from the W stage when needed), computes a value,
// writes r[rd] and sometimes the flags; every fifth one is a store. While it
// runs, the testbench shortens single clock cycles, sweeping the short cycle
// from 16 ns down to about 5 ns in 162 ps steps (68 glitches). A cycle
// shorter than the delay chain is treated as a fault cycle C_f: the values
// computed in it (X-stage result, the address entering X) and the register
// and flag writes committed at its end are corrupted.
//
// The trap handler follows the resume policy: flush, RDASR %asr20 -> %l3,
// RDASR %asr21 -> %l4, pick the shadow given by bufsel and mask its index
// with 0x1f, WRASR it to %asr22 or %asr23 (which restores the register and
// flags), RETT to %l1. Its bufsel branch is modelled as one predicated
// operation. Some faults are followed by a second glitch while the handler
// runs, at each handler position in turn, to exercise the restart.
//
// Checked: alarm exactly in the cycle after each glitch shorter than the
// delay chain and never otherwise; trap in that cycle with %l1 written with
// the address of the instruction that was in X during C_f; pipeline,
// flag and data-cache writes dropped in that cycle; safe mode one edge later;
// nominal mode after RETT; and at the end the register file and flags equal
// a fault-free sequential execution of the program. Each mechanism must
// occur at least once.
module tb_fame_top;
  import fame_pkg::*;

  localparam real         T_CLK   = 16.0;
  localparam real         T_DELAY = 15.0;  // default of the top
  localparam int          N_INSTR = 3600;
  localparam logic [31:0] BASE    = 32'h4000_0000;
  localparam logic [31:0] FMASK   = 32'hDEAD_BEEF;
  localparam logic [31:0] KMUL    = 32'h9E37_79B9;

  typedef enum int {H_FLUSH, H_RD20, H_RD21, H_ANDSEL, H_WRASR, H_RETT} hop_e;

  typedef struct {
    bit               valid;
    bit               handler;
    int               k;       // user instruction number
    hop_e             op;      // handler operation
    logic [31:0]      pc;
    rf_wr_t           res;     // register write, filled in X
    bit               icc_we;
    logic [ICC_W-1:0] icc;
    bit               store;
    logic [4:0]       asr;     // WRASR target, filled in X
    logic [31:0]      asr_val;
  } ins_t;

  // DUT connections
  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  rf_wr_t           xw_wr = '0, w_rf = '0, rf_wr;
  logic [ICC_W-1:0] xw_icc = '0, w_icc = '0, icc;
  logic [XLEN-1:0]  mx_pc = '0;
  logic             w_icc_we = 1'b0, m_dc_we = 1'b0, th_done = 1'b0;
  logic [4:0]       asr_rd_addr = '0, asr_wr_addr = '0;
  logic             asr_wr_en = 1'b0;
  logic [XLEN-1:0]  asr_wr_data = '0, asr_rd_data;
  logic             alarm, trap, th_restart, asr_rd_hit, bufsel, icc_we, dc_we;
  fame_mode_e       mode;

  fame_top dut (
    .clk(clk), .rst_n(rst_n),
    .xw_wr(xw_wr), .xw_icc(xw_icc), .mx_pc(mx_pc), .w_rf(w_rf),
    .w_icc_we(w_icc_we), .w_icc(w_icc), .m_dc_we(m_dc_we), .th_done(th_done),
    .asr_rd_addr(asr_rd_addr), .asr_wr_en(asr_wr_en), .asr_wr_addr(asr_wr_addr),
    .asr_wr_data(asr_wr_data),
    .alarm(alarm), .mode(mode), .trap(trap), .th_restart(th_restart),
    .asr_rd_hit(asr_rd_hit), .asr_rd_data(asr_rd_data), .bufsel(bufsel),
    .rf_wr(rf_wr), .icc_we(icc_we), .icc(icc), .dc_we(dc_we)
  );

  // Architectural state and pipeline model
  logic [31:0]      rf [32];
  logic [ICC_W-1:0] psr_icc;
  logic [31:0]      gold [32];
  logic [ICC_W-1:0] gold_icc;
  ins_t             st [7];    // 0 = F ... 5 = X, 6 = W
  int               fetch_k;
  int               h_next;    // next handler op to fetch, 6 = done
  int               since_resume;

  int checks = 0, failures = 0;
  int n_alarm = 0, n_glitch = 0, n_glitch_quiet = 0, n_enter = 0, n_restart = 0;
  int n_exit = 0, n_l1 = 0, n_wr_drop = 0, n_icc_drop = 0, n_dc_drop = 0;
  int n_rdasr = 0, n_restore0 = 0, n_restore1 = 0;
  bit          fault_cur = 1'b0;
  logic [31:0] exp_resume;
  bit          expect_alarm = 1'b0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $realtime, what);
    end
  endtask

  function automatic int rd_of(int k);  return 1 + (k % 15);            endfunction
  function automatic int rs_of(int k);  return 1 + ((k * 7 + 3) % 15);  endfunction
  function automatic bit store_of(int k); return (k % 5) == 4;          endfunction
  function automatic bit iccw_of(int k);  return (k % 3) == 0;          endfunction
  function automatic logic [31:0] op_of(int k, logic [31:0] src);
    return (src + 32'(k) * KMUL) ^ (src >> 3);
  endfunction

  function automatic ins_t bubble();
    ins_t b;
    b.valid = 1'b0; b.handler = 1'b0; b.k = 0; b.op = H_FLUSH; b.pc = '0;
    b.res = '0; b.icc_we = 1'b0; b.icc = '0; b.store = 1'b0; b.asr = '0;
    b.asr_val = '0;
    return b;
  endfunction

  function automatic logic [31:0] fwd(int r);
    if (st[6].valid && st[6].res.we && st[6].res.addr == 5'(r)) return st[6].res.data;
    return rf[r];
  endfunction

  // Drive the DUT inputs for the cycle that has just started.
  task automatic drive();
    ins_t x;
    logic [31:0] v3, v4, src;
    x = st[5];
    asr_rd_addr = '0;
    th_done     = 1'b0;
    if (x.valid && x.handler && x.op == H_RD20) asr_rd_addr = 5'd20;
    if (x.valid && x.handler && x.op == H_RD21) asr_rd_addr = 5'd21;
    #0.1;
    x.res = '0;
    x.icc_we = 1'b0;
    if (x.valid && !x.handler) begin
      src = op_of(x.k, fwd(rs_of(x.k)));
      x.res = '{we: !store_of(x.k), addr: 5'(rd_of(x.k)), data: src};
      x.icc_we = iccw_of(x.k);
      x.icc = src[31:28];
    end else if (x.valid) begin
      unique case (x.op)
        H_RD20, H_RD21: begin
          n_rdasr++;
          check(asr_rd_hit, "rdasr hit");
          x.res = '{we: 1'b1, addr: (x.op == H_RD20) ? 5'd19 : 5'd20, data: asr_rd_data};
        end
        H_ANDSEL: begin
          v3 = fwd(19);
          v4 = fwd(20);
          x.res = '{we: 1'b1, addr: 5'd21, data: (v3[31] ? v3 : v4) & 32'h1f};
        end
        H_WRASR: begin
          v3 = fwd(19);
          x.asr = v3[31] ? 5'd22 : 5'd23;
          x.asr_val = fwd(21);
        end
        H_RETT: th_done = 1'b1;
        default: ;
      endcase
    end
    st[5] = x;
    xw_wr  = x.res;
    xw_icc = x.icc;
    mx_pc  = st[4].pc;
    if (fault_cur) begin
      xw_wr.data = xw_wr.data ^ FMASK;
      mx_pc      = mx_pc ^ 32'h0000_0ff0;
    end
    w_rf     = st[6].valid ? st[6].res : '0;
    w_icc_we = st[6].valid && st[6].icc_we;
    w_icc    = st[6].icc;
    m_dc_we  = st[4].valid && !st[4].handler && store_of(st[4].k);
    asr_wr_en   = st[6].valid && st[6].handler && st[6].op == H_WRASR;
    asr_wr_addr = st[6].asr;
    asr_wr_data = st[6].asr_val;
    #0.1;
  endtask

  // One clock cycle of length len, from the rising edge that starts it (the
  // task is entered 0.5 ns after that edge) to the rising edge that ends it.
  // A cycle shorter than the delay chain is a fault cycle C_f.
  task automatic run(input real len);
    rf_wr_t           s_rf;
    bit               s_icc_we, s_trap, s_done, s_alarm, s_dc_we, s_safe, fault;
    logic [ICC_W-1:0] s_icc;
    fame_mode_e       s_mode;
    fault = rst_n && (len < T_DELAY);
    fault_cur = fault;
    if (fault && mode == MODE_NOMINAL && !expect_alarm) exp_resume = st[5].pc;
    drive();                          // takes 0.2 ns
    #(len / 2.0 - 0.7);
    clk = 1'b0;
    #(len / 2.0 - 0.1);
    // Sample what this cycle commits.
    s_rf     = rf_wr;
    s_icc_we = icc_we;
    s_icc    = icc;
    s_trap   = trap;
    s_alarm  = alarm;
    s_done   = th_done;
    s_dc_we  = dc_we;
    s_mode   = mode;
    s_safe   = (mode == MODE_SAFE);
    if (rst_n) begin
      check(s_alarm == expect_alarm, "alarm timing");
      check(s_trap == s_alarm, "trap follows alarm");
      if (s_alarm) begin
        n_alarm++;
        if (s_safe) n_restart++; else n_enter++;
        check(th_restart == s_safe, "restart flag");
        check(s_rf.we && s_rf.addr == REG_L1 && s_rf.data == exp_resume, "%l1 resume address");
        n_l1++;
        if (w_rf.we) n_wr_drop++;
        if (w_icc_we) begin n_icc_drop++; check(!s_icc_we, "flags write dropped"); end
        if (m_dc_we) begin n_dc_drop++; check(!s_dc_we, "dcache write dropped"); end
      end else begin
        check(s_dc_we == m_dc_we, "dcache write passes");
      end
      if (asr_wr_en && s_safe && !s_alarm) begin
        if (asr_wr_addr == 5'd22) n_restore0++; else n_restore1++;
      end
    end
    #0.1;
    clk = 1'b1;                       // edge that ends this cycle
    #0.5;
    fault_cur = 1'b0;
    if (rst_n) begin
      // Commit (corrupted when the cycle was a fault cycle)
      if (s_rf.we) rf[s_rf.addr] = fault ? (s_rf.data ^ FMASK) : s_rf.data;
      if (s_icc_we) psr_icc = fault ? ~s_icc : s_icc;
      if (s_alarm) check(mode == MODE_SAFE, "safe mode after alarm");
      else if (s_done && s_mode == MODE_SAFE) begin
        n_exit++;
        check(mode == MODE_NOMINAL, "nominal after handler");
      end
      // Pipeline advance
      if (s_trap) begin
        for (int i = 0; i < 7; i++) st[i] = bubble();
        st[0].valid = 1'b1; st[0].handler = 1'b1; st[0].op = H_FLUSH;
        h_next = 1;
      end else if (s_done) begin
        st[6] = st[5];
        for (int i = 0; i < 6; i++) st[i] = bubble();
        fetch_k = int'((fwd(17) - BASE) >> 2);
        h_next = 6;
        since_resume = 0;
      end else begin
        for (int i = 6; i > 0; i--) st[i] = st[i-1];
        st[0] = bubble();
      end
      if (!s_trap) begin
        if (h_next < 6) begin
          st[0].valid = 1'b1; st[0].handler = 1'b1; st[0].op = hop_e'(h_next);
          h_next++;
        end else if (!s_safe || s_done) begin
          if (fetch_k < N_INSTR) begin
            st[0].valid = 1'b1; st[0].k = fetch_k;
            st[0].pc = BASE + 32'(fetch_k) * 4;
            fetch_k++;
          end
        end
      end
      since_resume++;
    end
    // The alarm belongs to the cycle after a cycle shorter than the chain.
    expect_alarm = fault;
  endtask

  function automatic bit user_full();
    for (int i = 0; i < 7; i++) if (!st[i].valid || st[i].handler) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real w;
    int  g, ncyc, hpos;
    bit  second;
    for (int r = 0; r < 32; r++) rf[r] = 32'h1000_0000 * 32'(r % 3) + 32'(r * 17);
    psr_icc = '0;
    for (int r = 0; r < 32; r++) gold[r] = rf[r];
    gold_icc = '0;
    for (int k = 0; k < N_INSTR; k++) begin
      logic [31:0] v;
      v = op_of(k, gold[rs_of(k)]);
      if (!store_of(k)) gold[rd_of(k)] = v;
      if (iccw_of(k)) gold_icc = v[31:28];
    end
    for (int i = 0; i < 7; i++) st[i] = bubble();
    fetch_k = 0;
    h_next = 6;
    since_resume = 100;
    #1 rst_n = 1'b0;
    #1 clk = 1'b1;
    #0.5;
    repeat (3) run(T_CLK);
    rst_n = 1'b1;
    g = 0;
    ncyc = 0;
    while (fetch_k < N_INSTR || st[6].valid || st[5].valid || mode == MODE_SAFE) begin
      ncyc++;
      if (ncyc > 200000) break;
      if (g < 68 && mode == MODE_NOMINAL && user_full() && since_resume > 12 &&
          fetch_k < N_INSTR - 20 && ncyc % 37 == 0) begin
        w = T_CLK - 0.162 * real'(g);
        second = (g % 3 == 2);
        hpos = (g / 3) % 6;
        g++;
        n_glitch++;
        if (w >= T_DELAY) n_glitch_quiet++;
        run(w);
        // Second glitch while the handler runs, with the handler op at X = hpos.
        if (second && w < T_DELAY) begin
          for (int c = 0; c < 30; c++) begin
            if (st[5].valid && st[5].handler && int'(st[5].op) == hpos && !trap) begin
              run(6.8);
              break;
            end
            run(T_CLK);
          end
        end
      end else begin
        run(T_CLK);
      end
    end
    repeat (3) run(T_CLK);
    check(g == 68, "all 68 glitches injected");
    for (int r = 1; r < 16; r++) check(rf[r] == gold[r], $sformatf("r%0d matches fault-free run", r));
    check(psr_icc == gold_icc, "flags match fault-free run");
    $display("glitches=%0d quiet=%0d alarms=%0d enter=%0d restart=%0d exit=%0d l1=%0d",
             n_glitch, n_glitch_quiet, n_alarm, n_enter, n_restart, n_exit, n_l1);
    $display("wr_drop=%0d icc_drop=%0d dc_drop=%0d rdasr=%0d restore0=%0d restore1=%0d cycles=%0d",
             n_wr_drop, n_icc_drop, n_dc_drop, n_rdasr, n_restore0, n_restore1, ncyc);
    check(n_alarm > 0, "alarm happened");
    check(n_glitch_quiet > 0, "glitch above the delay chain left unflagged");
    check(n_enter > 0, "nominal -> safe happened");
    check(n_restart > 0, "restart in safe mode happened");
    check(n_exit > 0, "safe -> nominal happened");
    check(n_l1 > 0, "%l1 write happened");
    check(n_wr_drop > 0, "register write dropped");
    check(n_icc_drop > 0, "flags write dropped");
    check(n_dc_drop > 0, "data-cache write dropped");
    check(n_rdasr > 0, "RDASR happened");
    check(n_restore0 > 0, "restore from shadow 0 happened");
    check(n_restore1 > 0, "restore from shadow 1 happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
