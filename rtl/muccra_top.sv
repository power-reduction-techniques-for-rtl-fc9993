// muccra_top: a multicontext coarse-grained reconfigurable processor array
// with operand isolation and selective context fetch.
//
// A 4x4 grid of 32-bit processing elements (PEs) is embedded in an
// island-style routing fabric: 5x5 switching elements (SEs) sit at the
// crossings of vertical and horizontal channels of three links each way.
// PEs read operands from the vertical channels beside them and drive results
// onto the horizontal channel above them; four 32x256 data memories hang on
// the bottom horizontal channel.  Every PE, SE, the memories and the context
// switching controller (CSC) hold 32 contexts; the CSC steps through them one
// per cycle, with relative branches computed by PE 0 (row 0, column 0).  The
// task configuration controller (TCC) keeps tasks in a 1K-entry configuration
// memory and multicasts them into the context memories before each run.
//
// Two power-reduction mechanisms are built in and on by default:
//   ISOLATE   - each ALU/SMU functional unit gets operands only when selected.
//   SELECTIVE - per-context use flags keep the context memories of PEs and
//               SEs that are idle in a context from being read.
// Setting both to 0 gives the reference array without them.
//
// Grid coordinates: SE(r,c), r,c = 0..4; PE(i,j) has SE(i,j) at its north-west
// corner.  Horizontal segment H(r,c) joins SE(r,c) and SE(r,c+1); PE(r,c)
// (or memory c when r = 4) drives it.  Vertical segment V(r,c) joins SE(r,c)
// and SE(r+1,c); PE(r,c-1) and PE(r,c) read it.  Words going down a vertical
// segment are registered as they enter the lower SE.
//
// The grid size, channel count, word width, context depth, memory sizes,
// the controllers and the two mechanisms follow the published design; the
// side a PE drives, the memory attachment, the branching PE and the host
// interface are this design's own.
//
// Host interface: cfg_* write configuration entries while idle; task_start
// with task_addr loads and runs a task; task_done pulses at the end.  The
// memories are reachable through mem_* while no task is running (read data
// one cycle after the address).  ce_pe/ce_se show in which cycles each
// context memory really read, cur_ctx and running the context in force.
module muccra_top
  import muccra_pkg::*;
#(
  parameter bit          ISOLATE   = 1'b1,
  parameter bit          SELECTIVE = 1'b1,
  parameter int unsigned CFG_DEPTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_we,
  input  logic [$clog2(CFG_DEPTH)-1:0] cfg_addr,
  input  cfg_entry_t                   cfg_wdata,
  input  logic                         task_start,
  input  logic [$clog2(CFG_DEPTH)-1:0] task_addr,
  output logic                         task_busy,
  output logic                         task_done,
  input  logic [1:0]                   mem_sel,
  input  logic                         mem_we,
  input  logic [7:0]                   mem_addr,
  input  logic [DW-1:0]                mem_wdata,
  output logic [DW-1:0]                mem_rdata,
  output logic                         running,
  output logic [CTXW-1:0]              cur_ctx,
  output logic                         branch_taken,
  output logic [NPE-1:0]               ce_pe,
  output logic [NSE-1:0]               ce_se
);
  // ---------------------------------------------------------------- control
  logic [NDEST-1:0] cw_we, flag_we;
  logic [CTXW-1:0]  cw_addr;
  logic [63:0]      cw_data;
  logic             csc_start, csc_done;
  logic [CTXW-1:0]  ptr;
  logic             ptr_valid;
  logic             br_cond [NPE];
  logic [CTXW-1:0]  br_off  [NPE];

  tcc #(.DEPTH(CFG_DEPTH)) u_tcc (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .task_start(task_start), .task_addr(task_addr), .busy(task_busy), .task_done(task_done),
    .cw_we(cw_we), .flag_we(flag_we), .cw_addr(cw_addr), .cw_data(cw_data),
    .csc_start(csc_start), .csc_done(csc_done)
  );

  csc u_csc (
    .clk(clk), .rst_n(rst_n), .start(csc_start), .br_cond(br_cond[0]), .br_off(br_off[0]),
    .cw_we(cw_we[DST_CSC]), .cw_addr(cw_addr), .cw_data(cw_data),
    .ptr(ptr), .ptr_valid(ptr_valid), .cp(cur_ctx), .running(running), .done(csc_done),
    .branch_taken(branch_taken)
  );

  // ---------------------------------------------------------------- fabric
  // Each SE, PE and memory keeps its outputs in its own generate scope
  // (os/on/oe/ow of an SE, he/hw for the horizontal segment a PE or memory
  // drives) and neighbours refer to them by name.  Keeping them as separate
  // signals rather than slices of shared arrays lets lint tools see that the
  // only closed paths in the fabric pass through the north input registers.
  word_t zero3 [NLINK];
  always_comb for (int k = 0; k < NLINK; k++) zero3[k] = '0;

  for (genvar r = 0; r <= ROWS; r++) begin : g_se_row
    for (genvar c = 0; c <= COLS; c++) begin : g_se
      word_t on [NLINK], oe [NLINK], os [NLINK], ow [NLINK];
      word_t in_n [NLINK], in_e [NLINK], in_s [NLINK], in_w [NLINK];
      if (r > 0) begin : g_n
        assign in_n = g_se_row[r-1].g_se[c].os;
      end else begin : g_n
        assign in_n = zero3;
      end
      if (r < ROWS) begin : g_s
        assign in_s = g_se_row[r+1].g_se[c].on;
      end else begin : g_s
        assign in_s = zero3;
      end
      if (c == 0) begin : g_w
        assign in_w = zero3;
      end else if (r < ROWS) begin : g_w
        assign in_w = g_pe_row[r].g_pe[c-1].he;
      end else begin : g_w
        assign in_w = g_mem[c-1].he;
      end
      if (c == COLS) begin : g_e
        assign in_e = zero3;
      end else if (r < ROWS) begin : g_e
        assign in_e = g_pe_row[r].g_pe[c].hw;
      end else begin : g_e
        assign in_e = g_mem[c].hw;
      end

      se #(.SELECTIVE(SELECTIVE)) u_se (
        .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid),
        .cw_we(cw_we[DST_SE + r*(COLS+1) + c]), .cw_addr(cw_addr), .cw_data(cw_data),
        .flag_we(flag_we[DST_SE + r*(COLS+1) + c]), .flag_data(cw_data[NCTX-1:0]),
        .in_n(in_n), .in_e(in_e), .in_s(in_s), .in_w(in_w),
        .out_n(on), .out_e(oe), .out_s(os), .out_w(ow),
        .fetch_ce(ce_se[r*(COLS+1) + c])
      );
    end
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_pe_row
    for (genvar j = 0; j < COLS; j++) begin : g_pe
      word_t he [NLINK], hw [NLINK];
      pe #(.ISOLATE(ISOLATE), .SELECTIVE(SELECTIVE)) u_pe (
        .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid),
        .cw_we(cw_we[i*COLS + j]), .cw_addr(cw_addr), .cw_data(cw_data),
        .flag_we(flag_we[i*COLS + j]), .flag_data(cw_data[NCTX-1:0]),
        .w_s(g_se_row[i].g_se[j].os),   .w_n(g_se_row[i+1].g_se[j].on),
        .e_s(g_se_row[i].g_se[j+1].os), .e_n(g_se_row[i+1].g_se[j+1].on),
        .up_e(g_se_row[i].g_se[j].oe),  .up_w(g_se_row[i].g_se[j+1].ow),
        .out_e(he), .out_w(hw),
        .br_cond(br_cond[i*COLS + j]), .br_off(br_off[i*COLS + j]), .fetch_ce(ce_pe[i*COLS + j])
      );
    end
  end

  // ---------------------------------------------------------------- memories
  // The four memories share one context memory (no selective fetch).
  logic [MEM_CFG_W-1:0] mcfg_bits;
  mem_cfg_t [NMEM-1:0]  mcfg;
  logic [DW-1:0]        mrd [NMEM];

  ctx_fetch #(.W(MEM_CFG_W), .DEPTH(NCTX), .SELECTIVE(1'b0)) u_mem_cmem (
    .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid),
    .cw_we(cw_we[DST_MEM]), .cw_addr(cw_addr), .cw_data(cw_data[MEM_CFG_W-1:0]),
    .flag_we(1'b0), .flag_data('1), .cfg(mcfg_bits), .ce()
  );
  assign mcfg = mcfg_bits;

  for (genvar j = 0; j < NMEM; j++) begin : g_mem
    word_t he [NLINK], hw [NLINK];
    mem_unit #(.DEPTH(MEM_DEPTH)) u_mem (
      .clk(clk), .rst_n(rst_n), .cfg(mcfg[j]),
      .seg_e(g_se_row[ROWS].g_se[j].oe), .seg_w(g_se_row[ROWS].g_se[j+1].ow),
      .out_e(he), .out_w(hw),
      .host_en(!running && mem_sel == 2'(j)), .host_we(mem_we), .host_addr(mem_addr),
      .host_wdata(mem_wdata), .rdata(mrd[j])
    );
  end

  logic [1:0] mem_sel_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mem_sel_q <= '0;
    else        mem_sel_q <= mem_sel;
  assign mem_rdata = mrd[mem_sel_q];
endmodule
