// ctx_mem: context memory of a reconfigurable unit.
//
// A synchronous single-read, single-write memory of DEPTH configuration words.
// The read address is the context pointer broadcast by the context switching
// controller for the next cycle; when ce is high the word is read at the clock
// edge and appears on dout for the whole of the following cycle.  When ce is
// low the memory does not read and dout holds its value (the stand-by state a
// real SRAM macro enters when its chip enable is negated).  The write port is
// used only by the task configuration controller while a task is loaded.
//
// Depth 32 and the widths (64 bits for a PE, 15 for an SE) follow the
// published architecture; it is modelled here as an array, standing in for
// the memory macro.
//
// Interface: clk, rst_n, we/waddr/wdata (load), ce/raddr (fetch); dout.
// Timing: one cycle read latency.
module ctx_mem #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     ce,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             dout
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  dout <= '0;
    else if (ce) dout <= mem[raddr];
endmodule
