// tb_pe_core: runs short context sequences on one PE core and checks the
// registered ALU/SMU outputs (one cycle after their context), the register
// file path, operand selections, the immediate, output registers holding
// while their unit is disabled, and the branch condition/offset outputs.
module tb_pe_core;
  import muccra_pkg::*;
  logic clk = 0, rst_n = 0;
  pe_cfg_t cfg;
  word_t in0, in1, alu_q, smu_q, rf_q;
  logic br_cond;
  logic [4:0] br_off;
  int checks = 0, failures = 0;

  pe_core dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .in0(in0), .in1(in1), .alu_q(alu_q),
               .smu_q(smu_q), .rf_q(rf_q), .br_cond(br_cond), .br_off(br_off));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s alu_q=%h smu_q=%h rf_q=%h", what, alu_q, smu_q, rf_q); end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; in0 = '0; in1 = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [31:0] x, z;
      logic [13:0] im;
      logic [2:0]  r;
      x = $urandom; z = $urandom; im = 14'($urandom); r = 3'($urandom);
      // context A: ALU add in0+in1, SMU load immediate, write SMU result to RF
      @(negedge clk);
      in0 = '{carry: 2'b00, data: x}; in1 = '{carry: 2'b00, data: z};
      cfg = '0;
      cfg.alu_en = 1; cfg.alu_op = ALU_ADD; cfg.alu_a = ASRC_IN0; cfg.alu_b = BSRC_IN1;
      cfg.smu_en = 1; cfg.smu_op = SMU_LDI; cfg.imm = im;
      cfg.rf_we = 1; cfg.rf_wsrc = WSRC_SMU; cfg.rf_waddr = r;
      #1 check(br_off === 5'(im), "branch offset from the SMU");
      step();
      check(alu_q.data === x + z, "add registered");
      check(smu_q.data === 32'(signed'(im)), "immediate registered");
      // context B: units disabled, RF read of r; outputs must hold
      @(negedge clk);
      cfg = '0; cfg.rf_raddr = r;
      in0 = '{carry: 2'b00, data: ~x};
      #1 check(rf_q.data === 32'(signed'(im)), "register file holds SMU result");
      check(br_cond === 1'b0 && br_off === 5'd0, "no branch signals when idle");
      step();
      check(alu_q.data === x + z, "ALU output holds while disabled");
      check(smu_q.data === 32'(signed'(im)), "SMU output holds while disabled");
      // context C: ALU subtract RF - imm, SMU shifts the old ALU result
      @(negedge clk);
      cfg = '0; cfg.rf_raddr = r;
      cfg.alu_en = 1; cfg.alu_op = ALU_SUB; cfg.alu_a = ASRC_RF; cfg.alu_b = BSRC_IMM; cfg.imm = 14'd5;
      cfg.smu_en = 1; cfg.smu_op = SMU_SLL; cfg.smu_src = SSRC_ALU; cfg.smu_amt = 5'd3;
      step();
      check(alu_q.data === 32'(signed'(im)) - 32'd5, "subtract register minus immediate");
      check(smu_q.data === (x + z) << 3, "SMU reads the registered ALU output");
      // context D: compare LT of smu_q against in1, sets branch condition
      @(negedge clk);
      cfg = '0; cfg.alu_en = 1; cfg.alu_op = ALU_LT; cfg.alu_a = ASRC_SMU; cfg.alu_b = BSRC_IN1;
      #1 check(br_cond === (int'((x + z) << 3) < int'(z)), "branch condition from compare");
      step();
      check(alu_q.carry[1] === (int'((x + z) << 3) < int'(z)), "compare flag registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
