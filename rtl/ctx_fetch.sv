// ctx_fetch: context memory with selective context fetch.
//
// Every reconfigurable unit keeps, beside its context memory, one use flag per
// context saying whether the unit does anything in that context.  When the
// controller broadcasts the next context pointer, the flag of that context is
// looked up: only if it is set is the memory's chip enable raised and the word
// read; otherwise the memory stays in stand-by and the unit gets the default
// configuration (all zeros, the idle word) for that cycle instead.  The flags
// are loaded like any configuration data, before the task starts.  The flag
// lookup sits in front of the memory's address/enable path, so it adds delay
// to the fetch but no cycle.
//
// The flag register, the chip-enable gating and the default word are the
// published mechanism.  Flags reset to all ones (fetch everything) so that a
// task loaded without flag entries behaves as without the mechanism; that is
// this design's own choice.  SELECTIVE=0 gives the reference unit: the memory
// reads whenever a pointer is broadcast and the flags are ignored.
//
// Interface: ptr/ptr_valid from the controller; cw_* and flag_* from the task
// configuration controller; cfg is the configuration for the current cycle,
// ce shows when the memory actually read.  Timing: cfg follows ptr by one
// cycle.  When no pointer was broadcast cfg is the default word.
module ctx_fetch #(
  parameter int unsigned W         = 64,
  parameter int unsigned DEPTH     = 32,
  parameter bit          SELECTIVE = 1'b1,
  parameter logic [W-1:0] DEFAULT  = '0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] ptr,
  input  logic                     ptr_valid,
  input  logic                     cw_we,
  input  logic [$clog2(DEPTH)-1:0] cw_addr,
  input  logic [W-1:0]             cw_data,
  input  logic                     flag_we,
  input  logic [DEPTH-1:0]         flag_data,
  output logic [W-1:0]             cfg,
  output logic                     ce
);
  logic [DEPTH-1:0] flags;
  logic             use_q;
  logic [W-1:0]     dout;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       flags <= '1;
    else if (flag_we) flags <= flag_data;

  assign ce = ptr_valid && (!SELECTIVE || flags[ptr]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) use_q <= 1'b0;
    else        use_q <= ce;

  ctx_mem #(.W(W), .DEPTH(DEPTH)) u_mem (
    .clk(clk), .rst_n(rst_n), .we(cw_we), .waddr(cw_addr), .wdata(cw_data),
    .ce(ce), .raddr(ptr), .dout(dout)
  );

  assign cfg = use_q ? dout : DEFAULT;
endmodule
