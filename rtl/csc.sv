// csc: context switching controller.
//
// A context counter steps the whole array through up to 32 hardware
// contexts, one per clock.  Each cycle it computes the pointer of the next
// context and broadcasts it (ptr, ptr_valid) to every context memory, which
// reads that context's word at the clock edge; so the configuration in force
// during a cycle is always that of the counter value cp.  The controller is
// itself reconfigurable: its own 2-bit context word says whether a branch is
// specified in the context and whether the context is the last of the task.
// The counter is incremented unless a branch is specified and taken; a taken
// branch adds the offset computed in the PE array to the counter (modulo 32),
// which gives loops and table jumps.  The branch condition and offset come
// combinationally from one designated PE in the same cycle.
//
// Published: the simple context counter, increment when no branch is
// specified or taken, branch condition and address computed in a PE and
// added to the counter, the controller's own configuration.  The halt bit,
// the start/done handshake and the use of the compare flag as condition are
// this design's own.
//
// Interface: start (pulse while idle) begins a task at context 0; done pulses
// for one cycle after the halting context has run; running is high for
// exactly the cycles in which a task context is in force.  cw_* load the
// controller's own context memory.
module csc
  import muccra_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            br_cond,
  input  logic [CTXW-1:0] br_off,
  input  logic            cw_we,
  input  logic [CTXW-1:0] cw_addr,
  input  logic [63:0]     cw_data,
  output logic [CTXW-1:0] ptr,
  output logic            ptr_valid,
  output logic [CTXW-1:0] cp,
  output logic            running,
  output logic            done,
  output logic            branch_taken
);
  csc_cfg_t cfg;
  logic [$bits(csc_cfg_t)-1:0] cfg_bits;
  logic unused_ce;

  ctx_fetch #(.W($bits(csc_cfg_t)), .DEPTH(NCTX), .SELECTIVE(1'b0)) u_cmem (
    .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid),
    .cw_we(cw_we), .cw_addr(cw_addr), .cw_data(cw_data[$bits(csc_cfg_t)-1:0]),
    .flag_we(1'b0), .flag_data('1), .cfg(cfg_bits), .ce(unused_ce)
  );
  assign cfg = csc_cfg_t'(cfg_bits);

  assign branch_taken = running && cfg.branch_en && br_cond && !cfg.halt;

  always_comb begin
    if (!running)          ptr = '0;
    else if (cfg.halt)     ptr = cp;
    else if (branch_taken) ptr = cp + br_off;
    else                   ptr = cp + 1'b1;
    ptr_valid = running ? !cfg.halt : start;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running <= 1'b0;
      cp      <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          cp      <= '0;
        end
      end else begin
        cp <= ptr;
        if (cfg.halt) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end

  // start is only meaningful while idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !running);
endmodule
