// smu: Shift & Mask Unit of a PE, 16 separate functional units behind operand
// isolation.
//
// The units are: logical shift left/right, arithmetic shift right, rotate
// left/right, keep-low-bits and clear-low-bits masks, byte and half-word
// extract, sign extension from 8 and 16 bits, byte swap, bit reverse, move,
// population count and load-immediate.  Shift and mask amounts come from the
// 5-bit amt field of the context word; LDI outputs the sign-extended 14-bit
// immediate.  Only the unit picked by op sees its operands (op_isolate); with
// en low the output is zero.  PASS moves the whole 34-bit word, carries
// included; every other unit clears the carry field.
//
// The published design names the SMU as the PE's data manipulator and counts its
// units among the PE's 32; the operation list is this design's own choice.
//
// Interface: en, op (smu_op_e), a (word_t), amt, imm in; y (word_t) out.
// Purely combinational.
module smu
  import muccra_pkg::*;
#(
  parameter bit ISOLATE = 1'b1
) (
  input  logic        en,
  input  smu_op_e     op,
  input  word_t       a,
  input  logic [4:0]  amt,
  input  logic [13:0] imm,
  output word_t       y
);
  localparam int unsigned NU = 16;

  logic [NU-1:0] sel;
  logic [WW-1:0] ga [NU];
  logic [WW-1:0] gb [NU];
  logic [WW-1:0] b;
  word_t         r  [NU];

  // Second operand: the amount, or the immediate for LDI.
  always_comb begin
    b = '0;
    if (op == SMU_LDI) b[DW-1:0] = {{(DW-14){imm[13]}}, imm};
    else               b[4:0]    = amt;
  end

  op_isolate #(.NU(NU), .W(WW), .ISOLATE(ISOLATE)) u_iso (
    .en(en), .op(op), .a(a), .b(b), .sel(sel), .ga(ga), .gb(gb)
  );

  function automatic logic [DW-1:0] lowmask(input logic [4:0] n);
    return (DW'(1) << n) - DW'(1);
  endfunction

  always_comb begin
    logic [DW-1:0] x;
    logic [4:0]    n;
    for (int u = 0; u < NU; u++) r[u] = '0;
    x = ga[SMU_SLL][DW-1:0];   n = gb[SMU_SLL][4:0];   r[SMU_SLL].data = x << n;
    x = ga[SMU_SRL][DW-1:0];   n = gb[SMU_SRL][4:0];   r[SMU_SRL].data = x >> n;
    x = ga[SMU_SRA][DW-1:0];   n = gb[SMU_SRA][4:0];   r[SMU_SRA].data = DW'($signed(x) >>> n);
    x = ga[SMU_ROL][DW-1:0];   n = gb[SMU_ROL][4:0];
    r[SMU_ROL].data = (n == 5'd0) ? x : ((x << n) | (x >> (6'd32 - {1'b0, n})));
    x = ga[SMU_ROR][DW-1:0];   n = gb[SMU_ROR][4:0];
    r[SMU_ROR].data = (n == 5'd0) ? x : ((x >> n) | (x << (6'd32 - {1'b0, n})));
    x = ga[SMU_MASKL][DW-1:0]; n = gb[SMU_MASKL][4:0]; r[SMU_MASKL].data = x & lowmask(n);
    x = ga[SMU_MASKH][DW-1:0]; n = gb[SMU_MASKH][4:0]; r[SMU_MASKH].data = x & ~lowmask(n);
    x = ga[SMU_BYTE][DW-1:0];  n = gb[SMU_BYTE][4:0];
    r[SMU_BYTE].data = (x >> {n[1:0], 3'b000}) & 32'h0000_00ff;
    x = ga[SMU_HALF][DW-1:0];  n = gb[SMU_HALF][4:0];
    r[SMU_HALF].data = (x >> {n[0], 4'b0000}) & 32'h0000_ffff;
    x = ga[SMU_SEXT8][DW-1:0];  r[SMU_SEXT8].data  = {{24{x[7]}}, x[7:0]};
    x = ga[SMU_SEXT16][DW-1:0]; r[SMU_SEXT16].data = {{16{x[15]}}, x[15:0]};
    x = ga[SMU_BSWAP][DW-1:0];  r[SMU_BSWAP].data  = {x[7:0], x[15:8], x[23:16], x[31:24]};
    x = ga[SMU_BITREV][DW-1:0];
    for (int i = 0; i < DW; i++) r[SMU_BITREV].data[i] = x[DW-1-i];
    r[SMU_PASS] = ga[SMU_PASS];
    x = ga[SMU_POPCNT][DW-1:0];
    for (int i = 0; i < DW; i++) r[SMU_POPCNT].data = r[SMU_POPCNT].data + DW'(x[i]);
    r[SMU_LDI].data = gb[SMU_LDI][DW-1:0];
  end

  always_comb begin
    y = '0;
    for (int u = 0; u < NU; u++)
      if (sel[u]) y = r[u];
  end
endmodule
