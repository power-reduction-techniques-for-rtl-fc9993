// tcc: task configuration controller.
//
// Holds the central configuration memory (1K entries) in which the host
// stores the configuration of one or more tasks, and loads a task into the
// distributed context memories before it runs.  Each entry carries a
// destination bitmap with one bit per reconfigurable unit (16 PEs, 25 SEs,
// the memory context, the controller), so one entry is multicast to every
// unit whose bit is set: identical contexts of many units cost one entry.
// An entry is either a context word (written at context ctx of each
// destination), a use-flag word for selective context fetch (data[31:0],
// bit c for context c), or the end marker of the task.
//
// Sequence: while idle the host may write entries (cfg_we/addr/wdata).  A
// task_start pulse with task_addr makes the controller read entries from
// task_addr on, one per cycle, multicasting each in the cycle after it is
// read.  On the end marker it pulses csc_start and waits for csc_done, then
// pulses task_done.  busy is high from task_start to task_done.
//
// Published: a 1K-deep central configuration memory per task, multicast by
// bitmap to the context memories of PEs and SEs before the task starts, use
// flags carried as configuration data.  The entry format, the end marker and
// the handshake are this design's own.
//
// Timing: entries are multicast one per cycle; csc_start pulses n+2 cycles
// after the clock edge that samples task_start, for a task of n entries
// (end marker included).
module tcc
  import muccra_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_addr,
  input  cfg_entry_t               cfg_wdata,
  input  logic                     task_start,
  input  logic [$clog2(DEPTH)-1:0] task_addr,
  output logic                     busy,
  output logic                     task_done,
  output logic [NDEST-1:0]         cw_we,
  output logic [NDEST-1:0]         flag_we,
  output logic [CTXW-1:0]          cw_addr,
  output logic [63:0]              cw_data,
  output logic                     csc_start,
  input  logic                     csc_done
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_e;

  cfg_entry_t    mem [DEPTH];
  cfg_entry_t    ent;
  state_e        state;
  logic [AW-1:0] raddr;
  logic          ent_v;

  always_ff @(posedge clk)
    if (cfg_we && state == S_IDLE) mem[cfg_addr] <= cfg_wdata;

  // Sequential entry fetch: one entry per cycle while loading.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_IDLE;
      raddr     <= '0;
      ent       <= '0;
      ent_v     <= 1'b0;
      csc_start <= 1'b0;
      task_done <= 1'b0;
    end else begin
      csc_start <= 1'b0;
      task_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          ent_v <= 1'b0;
          if (task_start) begin
            state <= S_LOAD;
            raddr <= task_addr;
          end
        end
        S_LOAD: begin
          if (ent_v && ent.kind == ENT_END) begin
            ent_v     <= 1'b0;
            state     <= S_RUN;
            csc_start <= 1'b1;
          end else begin
            ent   <= mem[raddr];
            ent_v <= 1'b1;
            raddr <= raddr + 1'b1;
          end
        end
        default: begin
          if (csc_done) begin
            state     <= S_IDLE;
            task_done <= 1'b1;
          end
        end
      endcase
    end

  always_comb begin
    cw_we   = '0;
    flag_we = '0;
    if (state == S_LOAD && ent_v) begin
      if (ent.kind == ENT_CTX)   cw_we   = ent.bitmap;
      if (ent.kind == ENT_FLAGS) flag_we = ent.bitmap;
    end
    cw_addr = ent.ctx;
    cw_data = ent.data;
  end

  assign busy = (state != S_IDLE);

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) task_start |-> !busy);
endmodule
