// rfile: PE register file, 8 entries of 34 bits (32 data + 2 carry bits).
//
// One write port, written at the rising clock edge when we is high, and one
// asynchronous read port, so a value written in one context can be read by
// the next.  Entries reset to zero.  The size is the published one; the port
// count and read timing are this design's own choice.
//
// Interface: clk, rst_n, we, waddr, wdata, raddr in; rdata out.
module rfile
  import muccra_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  word_t                    wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output word_t                    rdata
);
  word_t regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end

  assign rdata = regs[raddr];
endmodule
