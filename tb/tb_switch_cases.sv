// tb_switch_cases: the three context-switching test patterns on the full
// array.  The datapath is a total sum with constants on 8 PEs: every mapped
// PE adds its constant (1..8) to register r0 in every cycle its context is in
// force.  PE(0,1) counts cycles and sends the count over SE(0,1) to PE(0,0),
// which compares it with T = 20 and branches.
//   Case 1: one loop context (branch offset 0), no context switch.
//   Case 2: two identical contexts (same mapping, PEs 4..11) switched every
//           cycle: contexts change, the datapath does not.
//   Case 3: two contexts with the same computation on different PEs
//           (4..11, then 8..15) switched every cycle: the datapath changes.
// Each case is loaded from its own place in the configuration memory after a
// reset.  Checked: the register sums of all PEs against the number of times
// each context ran, the loop length, and each case's defining property
// (context switches and datapath changes per loop cycle).  Context-memory
// reads per case are printed as a measure of reconfiguration activity.
module tb_switch_cases;
  import muccra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, task_start = 0;
  logic [9:0] cfg_addr = 0, task_addr = 0;
  cfg_entry_t cfg_wdata = '0;
  logic task_busy, task_done, running, branch_taken;
  logic [31:0] mem_rdata;
  logic [4:0] cur_ctx;
  logic [NPE-1:0] ce_pe;
  logic [NSE-1:0] ce_se;

  muccra_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .task_start(task_start), .task_addr(task_addr), .task_busy(task_busy), .task_done(task_done),
    .mem_sel(2'd0), .mem_we(1'b0), .mem_addr(8'd0), .mem_wdata(32'd0), .mem_rdata(mem_rdata),
    .running(running), .cur_ctx(cur_ctx), .branch_taken(branch_taken), .ce_pe(ce_pe), .ce_se(ce_se)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register r0 and configuration of every PE, seen from outside
  word_t   rf0 [NPE];
  pe_cfg_t pcfg [NPE];
  for (genvar i = 0; i < ROWS; i++) begin : g_r
    for (genvar j = 0; j < COLS; j++) begin : g_c
      assign rf0[i*COLS+j]  = dut.g_pe_row[i].g_pe[j].u_pe.u_core.u_rf.regs[0];
      assign pcfg[i*COLS+j] = dut.g_pe_row[i].g_pe[j].u_pe.cfg;
    end
  end

  // activity counters of the current case
  int runs [NCTX];
  int switches, dp_changes, loop_cycles, cmem_reads;
  pe_cfg_t prev [NPE];
  logic    prev_loop = 0;
  logic [4:0] prev_ctx = 0;

  always @(posedge clk) begin
    logic changed, in_loop;
    in_loop = running && cur_ctx != 5'd0 && !dut.u_csc.cfg.halt;
    if (in_loop) begin
      runs[cur_ctx]++;
      loop_cycles++;
      if (prev_loop) begin
        if (cur_ctx != prev_ctx) switches++;
        changed = 0;
        for (int p = 2; p < NPE; p++) if (pcfg[p] != prev[p]) changed = 1;
        if (changed) dp_changes++;
      end
    end
    if (dut.ptr_valid) cmem_reads += $countones({ce_pe, ce_se});
    for (int p = 0; p < NPE; p++) prev[p] <= pcfg[p];
    prev_loop <= in_loop;
    prev_ctx  <= cur_ctx;
  end

  // ------------------------------------------------------------ programs
  localparam int T = 20;
  cfg_entry_t prog [$];

  function automatic logic [NDEST-1:0] one(input int d);
    return NDEST'(1) << d;
  endfunction

  task automatic put(input logic [NDEST-1:0] bm, input entry_kind_e k, input int c, input logic [63:0] d);
    prog.push_back('{bitmap: bm, kind: k, ctx: 5'(c), data: d});
  endtask

  // mapping of constant i (0..7) in loop context c of case cs
  function automatic int pe_of(input int cs, input int c, input int i);
    return (cs == 3 && c == 2) ? 8 + i : 4 + i;
  endfunction

  task automatic build(input int cs);
    pe_cfg_t p;
    se_cfg_t s;
    csc_cfg_t cc;
    int nloop;
    logic [31:0] fl [NPE];
    nloop = (cs == 1) ? 1 : 2;
    prog.delete();
    for (int c = 0; c < NCTX; c++) put('1, ENT_CTX, c, '0);
    for (int q = 0; q < NPE; q++) fl[q] = '0;
    // context 0: T into PE(0,0) r1, zero into PE(0,1) r0
    p = '0; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = 14'(T); p.rf_we = 1; p.rf_wsrc = WSRC_SMU; p.rf_waddr = 3'd1;
    put(one(0), ENT_CTX, 0, 64'(p));
    p.imm = '0; p.rf_waddr = 3'd0;
    put(one(1), ENT_CTX, 0, 64'(p));
    fl[0][0] = 1; fl[1][0] = 1;
    for (int c = 1; c <= nloop; c++) begin
      // loop control
      p = '0; p.alu_en = 1; p.alu_op = ALU_ADD; p.alu_a = ASRC_RF; p.alu_b = BSRC_IMM; p.imm = 14'd1;
      p.rf_we = 1; p.rf_wsrc = WSRC_ALU; p.pout[1][0] = POUT_ALU;
      put(one(1), ENT_CTX, c, 64'(p));
      p = '0; p.in0_sel = 4'd6; p.alu_en = 1; p.alu_op = ALU_LT; p.alu_a = ASRC_IN0; p.alu_b = BSRC_RF;
      p.rf_raddr = 3'd1; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = (cs == 1) ? 14'd0 : 14'h3fff;
      put(one(0), ENT_CTX, c, 64'(p));
      fl[0][c] = 1; fl[1][c] = 1;
      s = '0; s.link[0] = '{dmask: 3'b001, src: DIR_E};
      put(one(DST_SE + 1), ENT_CTX, c, 64'(s));
      // datapath: one entry per constant
      for (int i = 0; i < 8; i++) begin
        p = '0; p.alu_en = 1; p.alu_op = ALU_ADD; p.alu_a = ASRC_RF; p.alu_b = BSRC_IMM; p.imm = 14'(i + 1);
        p.rf_we = 1; p.rf_wsrc = WSRC_ALU;
        put(one(pe_of(cs, c, i)), ENT_CTX, c, 64'(p));
        fl[pe_of(cs, c, i)][c] = 1;
      end
    end
    cc = '0; cc.branch_en = 1'b1;
    put(one(DST_CSC), ENT_CTX, nloop, 64'(cc));
    cc = '0; cc.halt = 1'b1;
    put(one(DST_CSC), ENT_CTX, nloop + 1, 64'(cc));
    for (int q = 0; q < NPE; q++) put(one(q), ENT_FLAGS, 0, 64'(fl[q]));
    put(((NDEST'(1) << DST_MEM) - 1) & ~((NDEST'(1) << DST_SE) - 1) & ~one(DST_SE + 1), ENT_FLAGS, 0, '0);
    put(one(DST_SE + 1), ENT_FLAGS, 0, 64'((32'(1) << (nloop + 1)) - 2));
    put('0, ENT_END, 0, '0);
  endtask

  task automatic store(input int base);
    foreach (prog[i]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 10'(base + i); cfg_wdata = prog[i];
    end
    @(negedge clk); cfg_we = 0;
  endtask

  int base [4] = '{0, 0, 150, 300};
  int reads [4];

  initial begin
    #22 rst_n = 1;
    for (int cs = 1; cs <= 3; cs++) begin
      build(cs);
      store(base[cs]);
    end
    for (int cs = 1; cs <= 3; cs++) begin
      int exp_loop;
      @(negedge clk); rst_n = 0;
      @(negedge clk); rst_n = 1;
      for (int c = 0; c < NCTX; c++) runs[c] = 0;
      switches = 0; dp_changes = 0; loop_cycles = 0; cmem_reads = 0;
      @(negedge clk); task_start = 1; task_addr = 10'(base[cs]);
      @(negedge clk); task_start = 0;
      while (!task_done) @(negedge clk);
      // loop length: cycle j sees count j-1; the loop exits at the first
      // branching cycle with j-1 >= T
      exp_loop = (cs == 1) ? T + 1 : ((T % 2 == 0) ? T + 2 : T + 1);
      check(loop_cycles == exp_loop, $sformatf("case %0d loop length %0d", cs, loop_cycles));
      for (int q = 2; q < NPE; q++) begin
        logic [31:0] e;
        e = 0;
        for (int c = 1; c <= 2; c++)
          for (int i = 0; i < 8; i++)
            if ((cs > 1 || c == 1) && pe_of(cs, c, i) == q) e += 32'(i + 1) * 32'(runs[c]);
        check(rf0[q].data === e, $sformatf("case %0d PE %0d sum %0d expected %0d", cs, q, rf0[q].data, e));
      end
      if (cs == 1) check(switches == 0, "case 1: no context switch");
      else         check(switches == loop_cycles - 1, "cases 2/3: a context switch every cycle");
      if (cs == 3) check(dp_changes == loop_cycles - 1, "case 3: the datapath changes every cycle");
      else         check(dp_changes == 0, "cases 1/2: the datapath does not change");
      reads[cs] = cmem_reads;
      $display("case %0d: loop cycles %0d, context switches %0d, datapath changes %0d, context-memory reads %0d",
               cs, loop_cycles, switches, dp_changes, cmem_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
