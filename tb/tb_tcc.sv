// tb_tcc: stores two tasks at different addresses of the configuration
// memory, starts each, and records every multicast write.  Each entry must
// come out once, in order, one per cycle, on exactly the destinations of its
// bitmap (context or flag write port by kind); csc_start must follow the end
// marker, and task_done must follow csc_done.  The load time of a task of n
// entries must be n+2 cycles from task_start to csc_start.
module tb_tcc;
  import muccra_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, task_start = 0, csc_done = 0;
  logic [9:0] cfg_addr = 0, task_addr = 0;
  cfg_entry_t cfg_wdata;
  logic busy, task_done, csc_start;
  logic [NDEST-1:0] cw_we, flag_we;
  logic [4:0] cw_addr;
  logic [63:0] cw_data;
  cfg_entry_t prog [2][$];
  int base [2] = '{0, 700};
  int checks = 0, failures = 0, multicasts = 0;

  tcc dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
           .task_start(task_start), .task_addr(task_addr), .busy(busy), .task_done(task_done),
           .cw_we(cw_we), .flag_we(flag_we), .cw_addr(cw_addr), .cw_data(cw_data),
           .csc_start(csc_start), .csc_done(csc_done));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_wdata = '0;
    #12 rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      int n;
      n = 10 + 15 * p;
      for (int i = 0; i < n; i++) begin
        cfg_entry_t e;
        e.bitmap = {$urandom, $urandom};
        e.kind   = ($urandom_range(0, 3) == 0) ? ENT_FLAGS : ENT_CTX;
        e.ctx    = 5'($urandom);
        e.data   = {$urandom, $urandom};
        prog[p].push_back(e);
      end
      prog[p].push_back('{bitmap: '0, kind: ENT_END, ctx: '0, data: '0});
      foreach (prog[p][i]) begin
        @(negedge clk); cfg_we = 1; cfg_addr = 10'(base[p] + i); cfg_wdata = prog[p][i];
      end
    end
    @(negedge clk); cfg_we = 0;
    for (int p = 1; p >= 0; p--) begin
      int idx, cyc;
      check(!busy, "idle before start");
      @(negedge clk); task_start = 1; task_addr = 10'(base[p]);
      @(negedge clk); task_start = 0;
      idx = 0; cyc = 1;
      while (!csc_start && cyc < 200) begin
        if (cw_we != 0 || flag_we != 0) begin
          cfg_entry_t e;
          e = prog[p][idx];
          check(idx < prog[p].size() - 1, "no write beyond the end marker");
          check(cw_we === ((e.kind == ENT_CTX) ? e.bitmap : '0), "context write bitmap");
          check(flag_we === ((e.kind == ENT_FLAGS) ? e.bitmap : '0), "flag write bitmap");
          check(cw_addr === e.ctx && cw_data === e.data, "context address and data");
          if ($countones(e.bitmap) > 1) multicasts++;
          idx++;
        end
        @(negedge clk); cyc++;
      end
      check(idx == prog[p].size() - 1, "every entry multicast once");
      check(cyc == prog[p].size() + 2, "load time n+2 cycles");
      check(busy, "busy while the task runs");
      repeat (5) @(negedge clk);
      check(!task_done, "no done before the controller finishes");
      csc_done = 1; @(negedge clk); csc_done = 0;
      check(task_done, "task_done follows csc_done");
      @(negedge clk);
      check(!busy && !task_done, "back to idle");
    end
    check(multicasts > 0, "multicast entries seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
