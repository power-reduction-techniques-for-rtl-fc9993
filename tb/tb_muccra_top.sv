// tb_muccra_top: end-to-end test of the whole array at its default size.
//
// The host fills memory 0 with data and memory 1 with a marker pattern,
// stores two tasks in the configuration memory and runs them one after the
// other.  Each task computes out[i] = in[i][15:0] * K for i < N: memory 0 ->
// PE(3,1) multiplier -> memory 1, with PE(3,0) generating the addresses, PE(0,0)
// counting iterations and branching back, PE(0,1) holding N, and three SEs
// routing.  Context plan of a task (one context per cycle):
//   0    initialise counters (load immediates into register files)
//   1 B0 address PE: i = r0 + 1 ; loop PE: r0 = r0 + 1
//   2 B1 address goes down the V(3,1) channel (north register of SE(4,1))
//   3 B2 SE(4,1) splits the address to both memories; memory 0 reads
//   4 B3 memory 0 data goes up to PE(3,1), which multiplies by K
//   5 B4 product and address go down to SE(4,1)
//   6 B5 memory 1 writes; PE(0,0) compares r0 < N and branches by -5
//   7    halt
// Each task starts with 32 multicast entries that clear every context of
// every unit, and sets use flags so units fetch only in contexts they use.
// Checked: results and untouched entries in memory 1, load and run cycle
// counts, and that every mechanism occurred: context switching, taken and
// untaken branches, skipped context fetches, isolated functional units, the
// north input register, SE split routes, multicast loading, memory reads,
// writes and read-data injection, and host access to the memories.
module tb_muccra_top;
  import muccra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, task_start = 0;
  logic [9:0] cfg_addr = 0, task_addr = 0;
  cfg_entry_t cfg_wdata = '0;
  logic task_busy, task_done, running, branch_taken;
  logic [1:0] mem_sel = 0;
  logic mem_we = 0;
  logic [7:0] mem_addr = 0;
  logic [31:0] mem_wdata = 0, mem_rdata;
  logic [4:0] cur_ctx;
  logic [NPE-1:0] ce_pe;
  logic [NSE-1:0] ce_se;

  muccra_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .task_start(task_start), .task_addr(task_addr), .task_busy(task_busy), .task_done(task_done),
    .mem_sel(mem_sel), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_rdata(mem_rdata), .running(running), .cur_ctx(cur_ctx), .branch_taken(branch_taken),
    .ce_pe(ce_pe), .ce_se(ce_se)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_switch = 0, n_taken = 0, n_untaken = 0, n_skip = 0, n_isolated = 0, n_north = 0;
  int n_split = 0, n_multicast = 0, n_memread = 0, n_memwrite = 0, n_inject = 0, n_host = 0;
  int run_cycles = 0;
  logic [4:0] last_ctx = 0;
  logic       last_run = 0;

  always @(posedge clk) if (rst_n) begin
    if (running) begin
      run_cycles++;
      if (last_run && cur_ctx != last_ctx) n_switch++;
      if (branch_taken) n_taken++;
      if (cur_ctx == 5'd6 && !branch_taken) n_untaken++;
      // isolation: PE(3,1) multiplies while its adder sees zero operands
      if (dut.g_pe_row[3].g_pe[1].u_pe.cfg.alu_op == ALU_MUL && dut.g_pe_row[3].g_pe[1].u_pe.cfg.alu_en
          && dut.g_pe_row[3].g_pe[1].u_pe.u_core.a.data != 0
          && dut.g_pe_row[3].g_pe[1].u_pe.u_core.u_alu.ga[ALU_ADD] == '0) n_isolated++;
      if (dut.g_se_row[4].g_se[1].u_se.cfg.link[0].src == DIR_N
          && dut.g_se_row[4].g_se[1].u_se.cfg.link[0].dmask == 3'b101) n_split++;
      if (dut.g_se_row[4].g_se[1].u_se.n_q[2] != '0) n_north++;
      if (dut.g_mem[0].u_mem.cfg.re) n_memread++;
      if (dut.g_mem[1].u_mem.cfg.we) n_memwrite++;
      if (dut.g_mem[0].u_mem.cfg.inject != '0) n_inject++;
    end
    if (dut.ptr_valid) n_skip += NPE + NSE - $countones({ce_pe, ce_se});
    if ($countones(dut.cw_we) > 1) n_multicast++;
    last_ctx <= cur_ctx;
    last_run <= running;
  end

  // ------------------------------------------------------------ program builder
  localparam int PE00 = 0, PE01 = 1, PE30 = 12, PE31 = 13;
  localparam int SE01 = DST_SE + 0 * 5 + 1, SE31 = DST_SE + 3 * 5 + 1, SE41 = DST_SE + 4 * 5 + 1;

  cfg_entry_t prog [$];

  function automatic logic [NDEST-1:0] one(input int d);
    return NDEST'(1) << d;
  endfunction

  task automatic put(input logic [NDEST-1:0] bm, input entry_kind_e k, input int c, input logic [63:0] d);
    prog.push_back('{bitmap: bm, kind: k, ctx: 5'(c), data: d});
  endtask

  function automatic logic [31:0] ctxs(input int a, input int b = -1, input int c = -1);
    logic [31:0] f;
    f = 32'(1) << a;
    if (b >= 0) f |= 32'(1) << b;
    if (c >= 0) f |= 32'(1) << c;
    return f;
  endfunction

  task automatic build(input int n, input int k);
    pe_cfg_t p;
    se_cfg_t s;
    mem_cfg_t [NMEM-1:0] m;
    logic [NDEST-1:0] used;
    csc_cfg_t cc;
    prog.delete();
    for (int c = 0; c < NCTX; c++) put('1, ENT_CTX, c, '0);          // clear everything
    used = one(PE00) | one(PE01) | one(PE30) | one(PE31) | one(SE01) | one(SE31) | one(SE41);
    put(~used & ((NDEST'(1) << DST_MEM) - 1), ENT_FLAGS, 0, '0);      // idle units never fetch
    put(one(PE00), ENT_FLAGS, 0, 64'(ctxs(0, 1, 6)));
    put(one(PE01), ENT_FLAGS, 0, 64'(ctxs(0, 6)));
    put(one(PE30), ENT_FLAGS, 0, 64'(ctxs(0, 1, 2) | ctxs(5)));
    put(one(PE31), ENT_FLAGS, 0, 64'(ctxs(4, 5)));
    put(one(SE01), ENT_FLAGS, 0, 64'(ctxs(6)));
    put(one(SE31), ENT_FLAGS, 0, 64'(ctxs(2, 5)));
    put(one(SE41), ENT_FLAGS, 0, 64'(ctxs(3, 4, 6)));
    // context 0: initial values
    p = '0; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = 14'd0;
    p.rf_we = 1; p.rf_wsrc = WSRC_SMU; p.rf_waddr = 3'd0;
    put(one(PE00), ENT_CTX, 0, 64'(p));
    p.imm = 14'h3fff;                                                // -1
    put(one(PE30), ENT_CTX, 0, 64'(p));
    p = '0; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = 14'(n);
    put(one(PE01), ENT_CTX, 0, 64'(p));
    // context 1 (B0): increment r0 in both counters (one multicast entry)
    p = '0; p.alu_en = 1; p.alu_op = ALU_ADD; p.alu_a = ASRC_RF; p.alu_b = BSRC_IMM; p.imm = 14'd1;
    p.rf_raddr = 3'd0; p.rf_we = 1; p.rf_wsrc = WSRC_ALU; p.rf_waddr = 3'd0;
    put(one(PE00) | one(PE30), ENT_CTX, 1, 64'(p));
    // contexts 2 and 5: address PE drives its ALU output eastbound on link 0
    p = '0; p.pout[0][0] = POUT_ALU;
    put(one(PE30), ENT_CTX, 2, 64'(p));
    put(one(PE30), ENT_CTX, 5, 64'(p));
    // context 4 (B3): multiply memory data (west channel northbound d1) by K
    p = '0; p.in0_sel = 4'd4; p.alu_en = 1; p.alu_op = ALU_MUL; p.alu_a = ASRC_IN0; p.alu_b = BSRC_IMM;
    p.imm = 14'(k);
    put(one(PE31), ENT_CTX, 4, 64'(p));
    // context 5 (B4): product westbound on link 2
    p = '0; p.pout[1][2] = POUT_ALU;
    put(one(PE31), ENT_CTX, 5, 64'(p));
    // context 6 (B5): N westbound on link 0; loop test and offset -5
    p = '0; p.pout[1][0] = POUT_SMU;
    put(one(PE01), ENT_CTX, 6, 64'(p));
    p = '0; p.in0_sel = 4'd6; p.alu_en = 1; p.alu_op = ALU_LT; p.alu_a = ASRC_RF; p.alu_b = BSRC_IN0;
    p.rf_raddr = 3'd0; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = 14'h3ffb;
    put(one(PE00), ENT_CTX, 6, 64'(p));
    // switching elements
    s = '0; s.link[0] = '{dmask: 3'b001, src: DIR_E};                 // E -> S
    put(one(SE01), ENT_CTX, 6, 64'(s));
    s = '0; s.link[0] = '{dmask: 3'b100, src: DIR_W};                 // W -> S
    s.link[2] = '{dmask: 3'b001, src: DIR_E};                         // E -> S
    put(one(SE31), ENT_CTX, 2, 64'(s));
    put(one(SE31), ENT_CTX, 5, 64'(s));
    s = '0; s.link[0] = '{dmask: 3'b101, src: DIR_N};                 // N -> E and W
    s.link[1] = '{dmask: 3'b001, src: DIR_W};                         // W -> N
    s.link[2] = '{dmask: 3'b001, src: DIR_N};                         // N -> E
    for (int c = 3; c <= 6; c += (c == 4) ? 2 : 1) put(one(SE41), ENT_CTX, c, 64'(s));
    // memories
    m = '0; m[0].re = 1; m[0].addr_sel = 3'd3;
    put(one(DST_MEM), ENT_CTX, 3, 64'(m));
    m = '0; m[0].inject[0][1] = 1'b1;
    put(one(DST_MEM), ENT_CTX, 4, 64'(m));
    m = '0; m[1].we = 1; m[1].addr_sel = 3'd0; m[1].wdata_sel = 3'd2;
    put(one(DST_MEM), ENT_CTX, 6, 64'(m));
    // controller
    cc = '0; cc.branch_en = 1'b1;
    put(one(DST_CSC), ENT_CTX, 6, 64'(cc));
    cc = '0; cc.halt = 1'b1;
    put(one(DST_CSC), ENT_CTX, 7, 64'(cc));
    put('0, ENT_END, 0, '0);
  endtask

  task automatic store(input int base);
    foreach (prog[i]) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 10'(base + i); cfg_wdata = prog[i];
    end
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic host_write(input int m, input int a, input logic [31:0] d);
    @(negedge clk); mem_sel = 2'(m); mem_we = 1; mem_addr = 8'(a); mem_wdata = d;
    @(negedge clk); mem_we = 0;
    n_host++;
  endtask

  task automatic host_read(input int m, input int a, output logic [31:0] d);
    @(negedge clk); mem_sel = 2'(m); mem_we = 0; mem_addr = 8'(a);
    @(negedge clk); d = mem_rdata;
    n_host++;
  endtask

  // ------------------------------------------------------------ test
  logic [31:0] src [256], dst [256];
  int base [2] = '{0, 300};
  int nval [2] = '{12, 25};
  int kval [2] = '{3, 1000};
  int len  [2];

  initial begin
    logic [31:0] d;
    #22 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      src[i] = $urandom;
      dst[i] = 32'hdead_0000 | 32'(i);
      host_write(0, i, src[i]);
      host_write(1, i, dst[i]);
    end
    for (int i = 0; i < 256; i += 17) begin
      host_read(0, i, d);
      check(d === src[i], "host read-back of memory 0");
    end
    for (int t = 0; t < 2; t++) begin
      build(nval[t], kval[t]);
      len[t] = prog.size();
      store(base[t]);
    end
    for (int t = 0; t < 2; t++) begin
      int load, run0;
      @(negedge clk); task_start = 1; task_addr = 10'(base[t]);
      @(negedge clk); task_start = 0;
      load = 1;
      while (!dut.csc_start) begin @(negedge clk); load++; end
      check(load == len[t] + 2, "load time: one entry per cycle");
      run0 = run_cycles;
      while (!task_done) @(negedge clk);
      check(run_cycles - run0 == 6 * nval[t] + 2, "run time: one context per cycle");
      for (int i = 0; i < nval[t]; i++) dst[i] = {16'b0, src[i][15:0]} * 32'(kval[t]);
      for (int i = 0; i < 40; i++) begin
        host_read(1, i, d);
        check(d === dst[i], $sformatf("memory 1 entry %0d after task %0d", i, t));
      end
    end
    $display("mechanisms: switches=%0d taken=%0d untaken=%0d skipped_fetches=%0d isolated=%0d north=%0d split=%0d multicast=%0d mem_read=%0d mem_write=%0d inject=%0d host=%0d",
             n_switch, n_taken, n_untaken, n_skip, n_isolated, n_north, n_split, n_multicast,
             n_memread, n_memwrite, n_inject, n_host);
    check(n_switch > 0,    "context switching happened");
    check(n_taken == nval[0] + nval[1] - 2, "loop branches taken");
    check(n_untaken == 2,  "loop exits (branch not taken)");
    check(n_skip > 0,      "selective fetch skipped context reads");
    check(n_isolated > 0,  "operand isolation held an unused unit at zero");
    check(n_north > 0,     "north input register carried data");
    check(n_split > 0,     "an SE split one link to two directions");
    check(n_multicast > 0, "multicast configuration entries");
    check(n_memread > 0 && n_memwrite > 0 && n_inject > 0, "memory read, write and injection");
    check(n_host > 0,      "host access to the memories");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
