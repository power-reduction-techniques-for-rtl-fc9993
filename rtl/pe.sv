// pe: a processing element of the array.
//
// Joins the PE core with its two connection blocks and its context memory.
// PICKIN takes the core's two operands from the vertical channels west and
// east of the PE; PICKOUT puts the ALU, SMU or register-file output onto the
// horizontal segment on the PE's north side, in either direction.  The 64-bit
// configuration comes from a 32-context memory behind the selective context
// fetch logic: in a context whose use flag is clear the memory is not read
// and the PE runs the idle word (units disabled, operands isolated, links
// passed through).
//
// Structure per the published PE (core, connection blocks, context memory);
// the channel sides and the selective-fetch default are described in the
// sub-blocks.
//
// Interface: context pointer broadcast (ptr, ptr_valid), configuration load
// ports (cw_*, flag_*), the four vertical link bundles, the horizontal
// segment (up_e/up_w in, out_e/out_w out) and the branch outputs.
module pe
  import muccra_pkg::*;
#(
  parameter bit ISOLATE   = 1'b1,
  parameter bit SELECTIVE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CTXW-1:0] ptr,
  input  logic            ptr_valid,
  input  logic            cw_we,
  input  logic [CTXW-1:0] cw_addr,
  input  logic [63:0]     cw_data,
  input  logic            flag_we,
  input  logic [NCTX-1:0] flag_data,
  input  word_t           w_s [NLINK],
  input  word_t           w_n [NLINK],
  input  word_t           e_s [NLINK],
  input  word_t           e_n [NLINK],
  input  word_t           up_e  [NLINK],
  input  word_t           up_w  [NLINK],
  output word_t           out_e [NLINK],
  output word_t           out_w [NLINK],
  output logic            br_cond,
  output logic [CTXW-1:0] br_off,
  output logic            fetch_ce
);
  pe_cfg_t cfg;
  logic [PE_CFG_W-1:0] cfg_bits;
  word_t in0, in1, alu_q, smu_q, rf_q;

  ctx_fetch #(.W(PE_CFG_W), .DEPTH(NCTX), .SELECTIVE(SELECTIVE)) u_cmem (
    .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid),
    .cw_we(cw_we), .cw_addr(cw_addr), .cw_data(cw_data),
    .flag_we(flag_we), .flag_data(flag_data), .cfg(cfg_bits), .ce(fetch_ce)
  );
  assign cfg = pe_cfg_t'(cfg_bits);

  pickin u_pickin (
    .w_s(w_s), .w_n(w_n), .e_s(e_s), .e_n(e_n),
    .sel0(cfg.in0_sel), .sel1(cfg.in1_sel), .in0(in0), .in1(in1)
  );

  pe_core #(.ISOLATE(ISOLATE)) u_core (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .in0(in0), .in1(in1),
    .alu_q(alu_q), .smu_q(smu_q), .rf_q(rf_q), .br_cond(br_cond), .br_off(br_off)
  );

  pickout u_pickout (
    .sel(cfg.pout), .up_e(up_e), .up_w(up_w),
    .alu_q(alu_q), .smu_q(smu_q), .rf_q(rf_q), .out_e(out_e), .out_w(out_w)
  );
endmodule
