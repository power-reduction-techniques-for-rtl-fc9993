// tb_csc: loads a small control program into the controller's own context
// memory (a loop whose last context branches back by a PE-supplied offset
// while a condition holds, then a halting context) and checks the broadcast
// pointer and context counter cycle by cycle, the taken/not-taken branches,
// the run length and the done pulse.
module tb_csc;
  import muccra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, br_cond = 0, cw_we = 0;
  logic [4:0] br_off = 0, cw_addr = 0, ptr, cp;
  logic [63:0] cw_data = 0;
  logic ptr_valid, running, done, taken;
  int checks = 0, failures = 0;

  csc dut (.clk(clk), .rst_n(rst_n), .start(start), .br_cond(br_cond), .br_off(br_off), .cw_we(cw_we),
           .cw_addr(cw_addr), .cw_data(cw_data), .ptr(ptr), .ptr_valid(ptr_valid), .cp(cp),
           .running(running), .done(done), .branch_taken(taken));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cp=%0d ptr=%0d running=%0b", what, cp, ptr, running); end
  endtask

  task automatic load(input int c, input csc_cfg_t v);
    @(negedge clk); cw_we = 1; cw_addr = 5'(c); cw_data = 64'(v);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int c = 0; c < 32; c++) load(c, '0);
    load(4, '{halt: 1'b0, branch_en: 1'b1});   // loop end: back to context 1
    load(6, '{halt: 1'b1, branch_en: 1'b0});   // end of task
    @(negedge clk); cw_we = 0;
    for (int rep = 0; rep < 3; rep++) begin
      int iters, cycles, exp_cp;
      iters = rep + 2;
      check(!running && !ptr_valid, "idle");
      @(negedge clk); start = 1;
      #1 check(ptr === 0 && ptr_valid, "context 0 broadcast on start");
      @(negedge clk); start = 0;
      cycles = 0; exp_cp = 0;
      for (int it = 0; ; ) begin
        check(running && cp === 5'(exp_cp), "context counter");
        br_cond = (exp_cp == 4) && (it < iters - 1);
        br_off  = (exp_cp == 4) ? 5'(-3) : 5'($urandom);
        if (exp_cp == 4 && !br_cond) br_cond = 0;
        #1;
        if (exp_cp == 4) begin
          check(taken === br_cond, "branch taken only when specified and true");
          it++;
        end else begin
          br_cond = 1; #1;
          check(!taken, "no branch where none is specified");
        end
        if (exp_cp == 6) begin
          check(!ptr_valid, "no fetch after the halting context");
          @(negedge clk); cycles++;
          break;
        end
        if (exp_cp == 4 && taken) exp_cp = 1; else exp_cp++;
        check(ptr === 5'(exp_cp) && ptr_valid, "next pointer broadcast");
        @(negedge clk); cycles++;
      end
      check(done && !running, "done pulse after the halting context");
      check(cycles == 5 + 4 * (iters - 1) + 2, "run length in cycles");
      @(negedge clk);
      check(!done, "done lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
