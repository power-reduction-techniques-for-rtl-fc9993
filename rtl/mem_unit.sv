// mem_unit: one of the four distributed data memories under the PE array.
//
// A 32-bit x 256-entry synchronous memory sitting under a segment of the
// bottom horizontal channel.  In each context its configuration picks the
// address and the write data from the six words on that segment (three
// eastbound, codes 0..2, and three westbound, codes 3..5; the address is the
// low 8 data bits), enables a read and/or a write, and chooses on which links
// the read data is driven onto the segment in place of the word passing by.
// Read data appears one cycle after the address, zero-extended with clear
// carries.  While the array is idle the host owns the memory through the
// host_* port (one-cycle read latency as well).
//
// Published: four memories of 32 bits x 256 at the bottom of the array, and
// that the network connects PEs and memories.  How a memory attaches to the
// channel, its context word and the host port are this design's own.
//
// Interface: clk, rst_n, cfg (mem_cfg_t), seg_e/seg_w (words arriving on the
// segment), out_e/out_w (words leaving it), host_en/we/addr/wdata, rdata.
module mem_unit
  import muccra_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mem_cfg_t                 cfg,
  input  word_t                    seg_e [NLINK],
  input  word_t                    seg_w [NLINK],
  output word_t                    out_e [NLINK],
  output word_t                    out_w [NLINK],
  input  logic                     host_en,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [DW-1:0]            host_wdata,
  output logic [DW-1:0]            rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  word_t         cand [8];
  word_t         a_w, d_w, rd_w;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata;
  logic          we, re;

  always_comb begin
    for (int i = 0; i < 8; i++) cand[i] = '0;
    for (int k = 0; k < NLINK; k++) begin
      cand[k]         = seg_e[k];
      cand[NLINK + k] = seg_w[k];
    end
    a_w = cand[cfg.addr_sel];
    d_w = cand[cfg.wdata_sel];
  end

  assign addr  = host_en ? host_addr  : a_w.data[AW-1:0];
  assign wdata = host_en ? host_wdata : d_w.data;
  assign we    = host_en ? host_we    : cfg.we;
  assign re    = host_en ? !host_we   : cfg.re;

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[addr];

  assign rd_w = '{carry: '0, data: rdata};

  always_comb
    for (int k = 0; k < NLINK; k++) out_e[k] = cfg.inject[0][k] ? rd_w : seg_e[k];

  always_comb
    for (int k = 0; k < NLINK; k++) out_w[k] = cfg.inject[1][k] ? rd_w : seg_w[k];
endmodule
