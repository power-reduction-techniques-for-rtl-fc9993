// pe_core: the programmable core of a processing element.
//
// Holds an ALU, a Shift & Mask Unit and an 8-entry register file.  The context
// word chooses each unit's operands among the two pick-in words in0/in1, the
// register-file read port, the other unit's registered output and a 14-bit
// sign-extended immediate.  ALU and SMU results are captured in output
// registers, which load only in contexts that enable the unit, so a result
// stays available to later contexts.  The register file writes in0, in1 or
// the ALU or SMU result of the current cycle.
//
// The unregistered results also leave the core as branch signals: the ALU
// compare flag (carry[1]) is the branch condition and the low 5 bits of the
// SMU result the branch offset, so one context can test a value and supply a
// jump distance (for instance a loaded immediate) at once.  The array uses
// those of one designated PE to steer the context controller.
//
// The three units and the 34-bit word follow the published PE core.  The
// operand multiplexers, the output registers (they also break combinational
// paths through the routing) and the branch outputs are this design's own
// reading of the core.
//
// Interface: clk, rst_n, cfg (pe_cfg_t), in0, in1; alu_q, smu_q, rf_q,
// br_cond, br_off.  Timing: results appear on alu_q/smu_q one cycle after
// their context.
module pe_core
  import muccra_pkg::*;
#(
  parameter bit ISOLATE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pe_cfg_t         cfg,
  input  word_t           in0,
  input  word_t           in1,
  output word_t           alu_q,
  output word_t           smu_q,
  output word_t           rf_q,
  output logic            br_cond,
  output logic [CTXW-1:0] br_off
);
  word_t a, b, s, alu_y, smu_y, wd, imm_w;

  assign imm_w = '{carry: '0, data: {{(DW-14){cfg.imm[13]}}, cfg.imm}};

  always_comb begin
    unique case (cfg.alu_a)
      ASRC_IN0: a = in0;
      ASRC_IN1: a = in1;
      ASRC_RF:  a = rf_q;
      default:  a = smu_q;
    endcase
    unique case (cfg.alu_b)
      BSRC_IN0: b = in0;
      BSRC_IN1: b = in1;
      BSRC_RF:  b = rf_q;
      default:  b = imm_w;
    endcase
    unique case (cfg.smu_src)
      SSRC_IN0: s = in0;
      SSRC_IN1: s = in1;
      SSRC_RF:  s = rf_q;
      default:  s = alu_q;
    endcase
    unique case (cfg.rf_wsrc)
      WSRC_IN0: wd = in0;
      WSRC_ALU: wd = alu_y;
      WSRC_SMU: wd = smu_y;
      default:  wd = in1;
    endcase
  end

  alu #(.ISOLATE(ISOLATE)) u_alu (
    .en(cfg.alu_en), .op(cfg.alu_op), .a(a), .b(b), .cin(in1.carry[0]), .y(alu_y)
  );

  smu #(.ISOLATE(ISOLATE)) u_smu (
    .en(cfg.smu_en), .op(cfg.smu_op), .a(s), .amt(cfg.smu_amt), .imm(cfg.imm), .y(smu_y)
  );

  rfile #(.DEPTH(RF_DEPTH)) u_rf (
    .clk(clk), .rst_n(rst_n), .we(cfg.rf_we), .waddr(cfg.rf_waddr), .wdata(wd),
    .raddr(cfg.rf_raddr), .rdata(rf_q)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      alu_q <= '0;
      smu_q <= '0;
    end else begin
      if (cfg.alu_en) alu_q <= alu_y;
      if (cfg.smu_en) smu_q <= smu_y;
    end

  assign br_cond = alu_y.carry[1];
  assign br_off  = smu_y.data[CTXW-1:0];
endmodule
