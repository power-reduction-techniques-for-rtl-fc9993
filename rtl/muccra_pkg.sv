// muccra_pkg: types and constants shared by the MuCCRA array.
//
// The array is a 4x4 grid of processing elements (PEs) in an island-style
// routing fabric of 5x5 switching elements (SEs), with four distributed memories
// under the bottom row.  Everything moves 34-bit words: 32 data bits plus a
// 2-bit carry field.  Every reconfigurable unit holds 32 contexts.
//
// The 64-bit PE context word, the 15-bit SE context word and the context depth
// of 32 follow the published architecture.  The way the bits of those words
// are assigned to fields, the memory and controller context words and the
// configuration-memory entry format are this design's own choices.
package muccra_pkg;

  localparam int unsigned DW       = 32;       // data bits per word
  localparam int unsigned CW       = 2;        // carry bits per word
  localparam int unsigned WW       = DW + CW;  // width of a routed word
  localparam int unsigned NLINK    = 3;        // links d0, d1, d2 per channel
  localparam int unsigned NCTX     = 32;       // hardware contexts
  localparam int unsigned CTXW     = $clog2(NCTX);
  localparam int unsigned RF_DEPTH = 8;
  localparam int unsigned MEM_DEPTH = 256;
  localparam int unsigned PE_CFG_W = 64;
  localparam int unsigned SE_CFG_W = 15;

  // A routed word: carry[0] is the adder carry, carry[1] the compare flag.
  typedef struct packed {
    logic [CW-1:0] carry;
    logic [DW-1:0] data;
  } word_t;

  // Directions around a switching element.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // ALU functional units (16) and SMU functional units (16): 32 in total.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBC, ALU_AND, ALU_OR, ALU_XOR, ALU_NAND,
    ALU_NOR, ALU_XNOR, ALU_NOT, ALU_MAX, ALU_MIN, ALU_EQ, ALU_LT, ALU_MUL
  } alu_op_e;

  typedef enum logic [3:0] {
    SMU_SLL, SMU_SRL, SMU_SRA, SMU_ROL, SMU_ROR, SMU_MASKL, SMU_MASKH, SMU_BYTE,
    SMU_HALF, SMU_SEXT8, SMU_SEXT16, SMU_BSWAP, SMU_BITREV, SMU_PASS, SMU_POPCNT, SMU_LDI
  } smu_op_e;

  // Operand sources inside the PE core.
  typedef enum logic [1:0] {ASRC_IN0, ASRC_IN1, ASRC_RF, ASRC_SMU} alu_a_src_e;
  typedef enum logic [1:0] {BSRC_IN0, BSRC_IN1, BSRC_RF, BSRC_IMM} alu_b_src_e;
  typedef enum logic [1:0] {SSRC_IN0, SSRC_IN1, SSRC_RF, SSRC_ALU} smu_src_e;
  typedef enum logic [1:0] {WSRC_IN0, WSRC_ALU, WSRC_SMU, WSRC_IN1} rf_src_e;
  // PICKOUT: what a PE puts on one horizontal link in one direction.
  typedef enum logic [1:0] {POUT_PASS, POUT_ALU, POUT_SMU, POUT_RF} pout_e;

  // PE context word, 64 bits.  All-zero is the idle configuration used when a
  // context is not fetched: both units disabled, no write, links passed through.
  typedef struct packed {
    logic [13:0]        imm;        // sign-extended immediate
    pout_e [1:0][NLINK-1:0] pout;   // [dir 0=eastbound,1=westbound][link]
    logic [2:0]         rf_raddr;
    logic [2:0]         rf_waddr;
    rf_src_e            rf_wsrc;
    logic               rf_we;
    logic [4:0]         smu_amt;    // shift / mask amount
    logic               smu_en;
    smu_op_e            smu_op;
    smu_src_e           smu_src;
    logic               alu_en;
    alu_op_e            alu_op;
    alu_b_src_e         alu_b;
    alu_a_src_e         alu_a;
    logic [3:0]         in1_sel;    // PICKIN selection of operand in1
    logic [3:0]         in0_sel;    // PICKIN selection of operand in0
  } pe_cfg_t;

  // One link of an SE: the entering direction and which of the other three
  // directions it leaves by (bit i: direction src+i+1 modulo 4).
  typedef struct packed {
    logic [2:0] dmask;
    dir_e       src;
  } se_link_cfg_t;

  typedef struct packed {
    se_link_cfg_t [NLINK-1:0] link;
  } se_cfg_t;

  // Distributed memory context word (per memory, 14 bits).
  typedef struct packed {
    logic [1:0][NLINK-1:0] inject;  // drive read data onto [dir][link]
    logic       we;
    logic       re;
    logic [2:0] wdata_sel;          // 0..5: link feeding the write data
    logic [2:0] addr_sel;           // 0..5: link feeding the address
  } mem_cfg_t;

  localparam int unsigned NMEM = 4;                  // one per bottom column
  localparam int unsigned MEM_CFG_W = $bits(mem_cfg_t) * NMEM;

  // Context word of the context switching controller itself.
  typedef struct packed {
    logic halt;        // last context of the task
    logic branch_en;   // a branch is specified in this context
  } csc_cfg_t;

  // Configuration memory entry of the task configuration controller.
  typedef enum logic [1:0] {ENT_CTX = 2'd0, ENT_FLAGS = 2'd1, ENT_END = 2'd2} entry_kind_e;

  // Multicast destinations: PEs 0..15, SEs 16..40, memory context 41, CSC 42.
  localparam int unsigned ROWS  = 4;                  // PE rows
  localparam int unsigned COLS  = 4;                  // PE columns
  localparam int unsigned NPE   = ROWS * COLS;
  localparam int unsigned NSE   = (ROWS + 1) * (COLS + 1);
  localparam int unsigned DST_SE  = NPE;
  localparam int unsigned DST_MEM = NPE + NSE;
  localparam int unsigned DST_CSC = NPE + NSE + 1;
  localparam int unsigned NDEST = NPE + NSE + 2;

  typedef struct packed {
    logic [NDEST-1:0] bitmap;
    entry_kind_e      kind;
    logic [CTXW-1:0]  ctx;
    logic [63:0]      data;
  } cfg_entry_t;

endpackage
