// alu: 32-bit arithmetic logic unit of a PE, built as 16 separate functional
// units behind operand isolation.
//
// Each unit (add, add with carry, subtract, subtract with borrow, six logic
// functions, not, signed max/min, equal, signed less-than, 16x16 multiply)
// has its own copy of the operands from op_isolate, so only the unit picked
// by op toggles.  The result word carries the adder carry in carry[0] and the
// compare flag of EQ/LT in carry[1]; the flag is what a PE hands to the
// context controller as a branch condition.  With en low the output is zero.
//
// The published design fixes the data width (32 bits plus 2 carry bits), that SMU and
// ALU together hold 32 functional units, and the isolation structure.  The
// list of operations, the carry conventions (cin comes from the carry of the
// second pick-in operand, subtract sets carry[0] when there is no borrow) and
// the 16-bit multiplier are this design's own choices.
//
// Interface: en, op (alu_op_e), a, b (word_t), cin in; y (word_t) out.
// Purely combinational.
module alu
  import muccra_pkg::*;
#(
  parameter bit ISOLATE = 1'b1
) (
  input  logic    en,
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  logic    cin,
  output word_t   y
);
  localparam int unsigned NU = 16;

  logic [NU-1:0] sel;
  logic [WW-1:0] ga [NU];
  logic [WW-1:0] gb [NU];
  word_t         r  [NU];

  op_isolate #(.NU(NU), .W(WW), .ISOLATE(ISOLATE)) u_iso (
    .en(en), .op(op), .a(a), .b(b), .sel(sel), .ga(ga), .gb(gb)
  );

  // Operand views of each unit (data part only).
  logic [DW-1:0] ua [NU];
  logic [DW-1:0] ub [NU];
  always_comb
    for (int u = 0; u < NU; u++) begin
      ua[u] = ga[u][DW-1:0];
      ub[u] = gb[u][DW-1:0];
    end

  logic cin_add, cin_sub;
  assign cin_add = cin & sel[ALU_ADDC];
  assign cin_sub = cin & sel[ALU_SUBC];

  always_comb begin
    logic [DW:0] s;
    for (int u = 0; u < NU; u++) r[u] = '0;
    s = {1'b0, ua[ALU_ADD]} + {1'b0, ub[ALU_ADD]};
    r[ALU_ADD]  = '{carry: {1'b0, s[DW]}, data: s[DW-1:0]};
    s = {1'b0, ua[ALU_ADDC]} + {1'b0, ub[ALU_ADDC]} + {{DW{1'b0}}, cin_add};
    r[ALU_ADDC] = '{carry: {1'b0, s[DW]}, data: s[DW-1:0]};
    s = {1'b0, ua[ALU_SUB]} + {1'b0, ~ub[ALU_SUB]} + {{DW{1'b0}}, 1'b1};
    r[ALU_SUB]  = '{carry: {1'b0, s[DW]}, data: s[DW-1:0]};
    s = {1'b0, ua[ALU_SUBC]} + {1'b0, ~ub[ALU_SUBC]} + {{DW{1'b0}}, cin_sub};
    r[ALU_SUBC] = '{carry: {1'b0, s[DW]}, data: s[DW-1:0]};
    r[ALU_AND].data  = ua[ALU_AND] & ub[ALU_AND];
    r[ALU_OR].data   = ua[ALU_OR] | ub[ALU_OR];
    r[ALU_XOR].data  = ua[ALU_XOR] ^ ub[ALU_XOR];
    r[ALU_NAND].data = ~(ua[ALU_NAND] & ub[ALU_NAND]);
    r[ALU_NOR].data  = ~(ua[ALU_NOR] | ub[ALU_NOR]);
    r[ALU_XNOR].data = ~(ua[ALU_XNOR] ^ ub[ALU_XNOR]);
    r[ALU_NOT].data  = ~ua[ALU_NOT];
    r[ALU_MAX].data  = ($signed(ua[ALU_MAX]) > $signed(ub[ALU_MAX])) ? ua[ALU_MAX] : ub[ALU_MAX];
    r[ALU_MIN].data  = ($signed(ua[ALU_MIN]) < $signed(ub[ALU_MIN])) ? ua[ALU_MIN] : ub[ALU_MIN];
    r[ALU_EQ].carry[1] = (ua[ALU_EQ] == ub[ALU_EQ]);
    r[ALU_EQ].data     = {{(DW-1){1'b0}}, r[ALU_EQ].carry[1]};
    r[ALU_LT].carry[1] = ($signed(ua[ALU_LT]) < $signed(ub[ALU_LT]));
    r[ALU_LT].data     = {{(DW-1){1'b0}}, r[ALU_LT].carry[1]};
    r[ALU_MUL].data  = ua[ALU_MUL][15:0] * ub[ALU_MUL][15:0];
  end

  // Output selection: the result of the selected unit, zero when disabled.
  always_comb begin
    y = '0;
    for (int u = 0; u < NU; u++)
      if (sel[u]) y = r[u];
  end
endmodule
