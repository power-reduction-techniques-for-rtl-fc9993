// tb_alpha_blend: the alpha blender workload on the full array at its
// default size.  Each word of memory 0 holds a pixel pair, a in bits 7:0 and b
// in bits 15:8; the task writes out[i] = (a*AL + b*(256-AL)) >> 8 to memory 1
// for i < N.  The fetch, address and loop part is the same as in
// tb_muccra_top; PE(3,1) does the blend in six contexts, with its register
// file and output registers carrying the intermediate values:
//   0     initialise counters
//   1     address PE: i = r0 + 1 ; loop PE: r0 = r0 + 1
//   2     address goes down to the north register of SE(4,1)
//   3     SE(4,1) splits the address to both memories; memory 0 reads
//   4     pixel pair up to PE(3,1): r1 = pair, smu_q = a
//   5     alu_q = a*AL (also to r2) ; smu_q = b (byte 1 of r1)
//   6     r3 = b*(256-AL) ; smu_q = r2
//   7     alu_q = smu_q + r3
//   8     smu_q = alu_q >> 8
//   9     result and address go down to SE(4,1)
//   10    memory 1 writes; PE(0,0) compares r0 < N and branches by -9
//   11    halt
// Two tasks with different AL and N are stored at different configuration
// addresses and run one after the other.  Checked: every result and the
// untouched entries after them, the run length (10 cycles per pixel plus
// the first and last context), and that the blend PE fetched its context
// only in the six contexts it is used in.
module tb_alpha_blend;
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


  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles run and context fetches of the blend PE
  int run_cycles = 0, blend_fetch = 0;
  always @(posedge clk) if (rst_n) begin
    if (running) run_cycles++;
    if (ce_pe[13]) blend_fetch++;
  end

  localparam int PE00 = 0, PE01 = 1, PE30 = 12, PE31 = 13;
  localparam int SE01 = DST_SE + 0 * 5 + 1, SE31 = DST_SE + 3 * 5 + 1, SE41 = DST_SE + 4 * 5 + 1;

  cfg_entry_t prog [$];

  function automatic logic [NDEST-1:0] one(input int d);
    return NDEST'(1) << d;
  endfunction

  task automatic put(input logic [NDEST-1:0] bm, input entry_kind_e k, input int c, input logic [63:0] d);
    prog.push_back('{bitmap: bm, kind: k, ctx: 5'(c), data: d});
  endtask

  function automatic logic [31:0] ctxs(input int a, input int b = -1, input int c = -1, input int d = -1);
    logic [31:0] f;
    f = 32'(1) << a;
    if (b >= 0) f |= 32'(1) << b;
    if (c >= 0) f |= 32'(1) << c;
    if (d >= 0) f |= 32'(1) << d;
    return f;
  endfunction

  task automatic build(input int n, input int al);
    pe_cfg_t p;
    se_cfg_t s;
    mem_cfg_t [NMEM-1:0] m;
    logic [NDEST-1:0] used;
    csc_cfg_t cc;
    prog.delete();
    for (int c = 0; c < NCTX; c++) put('1, ENT_CTX, c, '0);
    used = one(PE00) | one(PE01) | one(PE30) | one(PE31) | one(SE01) | one(SE31) | one(SE41);
    put(~used & ((NDEST'(1) << DST_MEM) - 1), ENT_FLAGS, 0, '0);
    put(one(PE00), ENT_FLAGS, 0, 64'(ctxs(0, 1, 10)));
    put(one(PE01), ENT_FLAGS, 0, 64'(ctxs(0, 10)));
    put(one(PE30), ENT_FLAGS, 0, 64'(ctxs(0, 1, 2, 9)));
    put(one(PE31), ENT_FLAGS, 0, 64'(32'h0000_03f0));                 // contexts 4..9
    put(one(SE01), ENT_FLAGS, 0, 64'(ctxs(10)));
    put(one(SE31), ENT_FLAGS, 0, 64'(ctxs(2, 9)));
    put(one(SE41), ENT_FLAGS, 0, 64'(ctxs(3, 4, 9, 10)));
    // context 0: loop counter 0, address counter -1, N
    p = '0; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = 14'd0;
    p.rf_we = 1; p.rf_wsrc = WSRC_SMU; p.rf_waddr = 3'd0;
    put(one(PE00), ENT_CTX, 0, 64'(p));
    p.imm = 14'h3fff;
    put(one(PE30), ENT_CTX, 0, 64'(p));
    p = '0; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = 14'(n);
    put(one(PE01), ENT_CTX, 0, 64'(p));
    // context 1: both counters step
    p = '0; p.alu_en = 1; p.alu_op = ALU_ADD; p.alu_a = ASRC_RF; p.alu_b = BSRC_IMM; p.imm = 14'd1;
    p.rf_we = 1; p.rf_wsrc = WSRC_ALU;
    put(one(PE00) | one(PE30), ENT_CTX, 1, 64'(p));
    // contexts 2 and 9: address eastbound on link 0
    p = '0; p.pout[0][0] = POUT_ALU;
    put(one(PE30), ENT_CTX, 2, 64'(p));
    put(one(PE30), ENT_CTX, 9, 64'(p));
    // contexts 4..9: the blend in PE(3,1)
    p = '0; p.in0_sel = 4'd4; p.rf_we = 1; p.rf_wsrc = WSRC_IN0; p.rf_waddr = 3'd1;
    p.smu_en = 1; p.smu_op = SMU_BYTE; p.smu_src = SSRC_IN0; p.smu_amt = 5'd0;
    put(one(PE31), ENT_CTX, 4, 64'(p));
    p = '0; p.alu_en = 1; p.alu_op = ALU_MUL; p.alu_a = ASRC_SMU; p.alu_b = BSRC_IMM; p.imm = 14'(al);
    p.rf_we = 1; p.rf_wsrc = WSRC_ALU; p.rf_waddr = 3'd2;
    p.smu_en = 1; p.smu_op = SMU_BYTE; p.smu_src = SSRC_RF; p.rf_raddr = 3'd1; p.smu_amt = 5'd1;
    put(one(PE31), ENT_CTX, 5, 64'(p));
    p = '0; p.alu_en = 1; p.alu_op = ALU_MUL; p.alu_a = ASRC_SMU; p.alu_b = BSRC_IMM; p.imm = 14'(256 - al);
    p.rf_we = 1; p.rf_wsrc = WSRC_ALU; p.rf_waddr = 3'd3;
    p.smu_en = 1; p.smu_op = SMU_PASS; p.smu_src = SSRC_RF; p.rf_raddr = 3'd2;
    put(one(PE31), ENT_CTX, 6, 64'(p));
    p = '0; p.alu_en = 1; p.alu_op = ALU_ADD; p.alu_a = ASRC_SMU; p.alu_b = BSRC_RF; p.rf_raddr = 3'd3;
    put(one(PE31), ENT_CTX, 7, 64'(p));
    p = '0; p.smu_en = 1; p.smu_op = SMU_SRL; p.smu_src = SSRC_ALU; p.smu_amt = 5'd8;
    put(one(PE31), ENT_CTX, 8, 64'(p));
    p = '0; p.pout[1][2] = POUT_SMU;
    put(one(PE31), ENT_CTX, 9, 64'(p));
    // context 10: N to PE(0,0), loop test, offset -9
    p = '0; p.pout[1][0] = POUT_SMU;
    put(one(PE01), ENT_CTX, 10, 64'(p));
    p = '0; p.in0_sel = 4'd6; p.alu_en = 1; p.alu_op = ALU_LT; p.alu_a = ASRC_RF; p.alu_b = BSRC_IN0;
    p.rf_raddr = 3'd0; p.smu_en = 1; p.smu_op = SMU_LDI; p.imm = 14'h3ff7;
    put(one(PE00), ENT_CTX, 10, 64'(p));
    // switching elements
    s = '0; s.link[0] = '{dmask: 3'b001, src: DIR_E};
    put(one(SE01), ENT_CTX, 10, 64'(s));
    s = '0; s.link[0] = '{dmask: 3'b100, src: DIR_W};
    s.link[2] = '{dmask: 3'b001, src: DIR_E};
    put(one(SE31), ENT_CTX, 2, 64'(s));
    put(one(SE31), ENT_CTX, 9, 64'(s));
    s = '0; s.link[0] = '{dmask: 3'b101, src: DIR_N};
    s.link[1] = '{dmask: 3'b001, src: DIR_W};
    s.link[2] = '{dmask: 3'b001, src: DIR_N};
    put(one(SE41), ENT_CTX, 3, 64'(s));
    put(one(SE41), ENT_CTX, 4, 64'(s));
    put(one(SE41), ENT_CTX, 9, 64'(s));
    put(one(SE41), ENT_CTX, 10, 64'(s));
    // memories
    m = '0; m[0].re = 1; m[0].addr_sel = 3'd3;
    put(one(DST_MEM), ENT_CTX, 3, 64'(m));
    m = '0; m[0].inject[0][1] = 1'b1;
    put(one(DST_MEM), ENT_CTX, 4, 64'(m));
    m = '0; m[1].we = 1; m[1].addr_sel = 3'd0; m[1].wdata_sel = 3'd2;
    put(one(DST_MEM), ENT_CTX, 10, 64'(m));
    // controller
    cc = '0; cc.branch_en = 1'b1;
    put(one(DST_CSC), ENT_CTX, 10, 64'(cc));
    cc = '0; cc.halt = 1'b1;
    put(one(DST_CSC), ENT_CTX, 11, 64'(cc));
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
  endtask

  task automatic host_read(input int m, input int a, output logic [31:0] d);
    @(negedge clk); mem_sel = 2'(m); mem_we = 0; mem_addr = 8'(a);
    @(negedge clk); d = mem_rdata;
  endtask

  logic [31:0] pix [256], dst [256];
  int base  [2] = '{0, 200};
  int nval  [2] = '{16, 40};
  int alval [2] = '{77, 200};

  initial begin
    logic [31:0] d;
    #22 rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      pix[i] = {16'($urandom), 8'($urandom), 8'($urandom)};
      dst[i] = 32'hbeef_0000 | 32'(i);
      host_write(0, i, pix[i]);
      host_write(1, i, dst[i]);
    end
    for (int t = 0; t < 2; t++) begin
      build(nval[t], alval[t]);
      store(base[t]);
    end
    for (int t = 0; t < 2; t++) begin
      int run0, fetch0;
      @(negedge clk); task_start = 1; task_addr = 10'(base[t]);
      @(negedge clk); task_start = 0;
      while (!running) @(negedge clk);
      run0 = run_cycles; fetch0 = blend_fetch;
      while (!task_done) @(negedge clk);
      check(run_cycles - run0 == 10 * nval[t] + 2, $sformatf("task %0d run length %0d", t, run_cycles - run0));
      check(blend_fetch - fetch0 == 6 * nval[t], $sformatf("task %0d blend PE fetches %0d", t, blend_fetch - fetch0));
      for (int i = 0; i < nval[t]; i++)
        dst[i] = ((32'(pix[i][7:0]) * 32'(alval[t])) + (32'(pix[i][15:8]) * 32'(256 - alval[t]))) >> 8;
      for (int i = 0; i < 48; i++) begin
        host_read(1, i, d);
        check(d === dst[i], $sformatf("task %0d memory 1 entry %0d: %08x expected %08x", t, i, d, dst[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
