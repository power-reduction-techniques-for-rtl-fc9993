// se: switching element at a crossing of a vertical and a horizontal channel.
//
// Four words enter on each link d0..d2, one from each direction, and four
// leave.  Per link the 15-bit context word (5 bits per link) names the one
// entering direction whose word this SE forwards, and a 3-bit mask of the
// other three directions it leaves by (bit i means direction src+1+i, counted
// N, E, S, W modulo 4), so a word can be steered, split or both.  Outputs not
// driven by any link route carry zero.  The four per-direction output
// multiplexers are the SE's switches.
//
// Words entering from the north are first captured in a register, so every
// downward hop costs a cycle; because any closed path in the grid must go
// down somewhere, this removes all combinational loops from the network.
// Words entering from the east, south and west pass through combinationally.
//
// Published: four multiplexer switches, links d0..d2, the north input
// register, the 15-bit and 32-context configuration.  The field layout of the
// 15 bits (one source and one destination mask per link) is this design's
// own.  The configuration comes through selective context fetch; the idle
// word routes nothing.
//
// Interface: context broadcast and load ports as for a PE; in_*/out_* per
// direction and link; fetch_ce shows when the context memory read.
module se
  import muccra_pkg::*;
#(
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
  input  word_t           in_n  [NLINK],
  input  word_t           in_e  [NLINK],
  input  word_t           in_s  [NLINK],
  input  word_t           in_w  [NLINK],
  output word_t           out_n [NLINK],
  output word_t           out_e [NLINK],
  output word_t           out_s [NLINK],
  output word_t           out_w [NLINK],
  output logic            fetch_ce
);
  se_cfg_t cfg;
  logic [SE_CFG_W-1:0] cfg_bits;
  word_t   n_q [NLINK];

  ctx_fetch #(.W(SE_CFG_W), .DEPTH(NCTX), .SELECTIVE(SELECTIVE)) u_cmem (
    .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid),
    .cw_we(cw_we), .cw_addr(cw_addr), .cw_data(cw_data[SE_CFG_W-1:0]),
    .flag_we(flag_we), .flag_data(flag_data), .cfg(cfg_bits), .ce(fetch_ce)
  );
  assign cfg = se_cfg_t'(cfg_bits);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < NLINK; k++) n_q[k] <= '0;
    end else begin
      for (int k = 0; k < NLINK; k++) n_q[k] <= in_n[k];
    end

  // One output multiplexer (switch) per direction.  A direction's output on
  // link k is the link's source word if the source is another direction and
  // the mask bit for this direction is set.  Each switch only reads the three
  // other inputs, so no output depends on the input of its own side.
  function automatic logic leaves(input se_link_cfg_t lc, input dir_e d);
    logic hit;
    hit = 1'b0;
    for (int i = 0; i < 3; i++)
      if (lc.dmask[i] && (2'(lc.src + 2'(i + 1)) == d)) hit = 1'b1;
    return hit;
  endfunction

  always_comb
    for (int k = 0; k < NLINK; k++) begin
      unique case (cfg.link[k].src)
        DIR_E:   out_n[k] = in_e[k];
        DIR_S:   out_n[k] = in_s[k];
        DIR_W:   out_n[k] = in_w[k];
        default: out_n[k] = '0;
      endcase
      if (!leaves(cfg.link[k], DIR_N)) out_n[k] = '0;
    end

  always_comb
    for (int k = 0; k < NLINK; k++) begin
      unique case (cfg.link[k].src)
        DIR_N:   out_e[k] = n_q[k];
        DIR_S:   out_e[k] = in_s[k];
        DIR_W:   out_e[k] = in_w[k];
        default: out_e[k] = '0;
      endcase
      if (!leaves(cfg.link[k], DIR_E)) out_e[k] = '0;
    end

  always_comb
    for (int k = 0; k < NLINK; k++) begin
      unique case (cfg.link[k].src)
        DIR_N:   out_s[k] = n_q[k];
        DIR_E:   out_s[k] = in_e[k];
        DIR_W:   out_s[k] = in_w[k];
        default: out_s[k] = '0;
      endcase
      if (!leaves(cfg.link[k], DIR_S)) out_s[k] = '0;
    end

  always_comb
    for (int k = 0; k < NLINK; k++) begin
      unique case (cfg.link[k].src)
        DIR_N:   out_w[k] = n_q[k];
        DIR_E:   out_w[k] = in_e[k];
        DIR_S:   out_w[k] = in_s[k];
        default: out_w[k] = '0;
      endcase
      if (!leaves(cfg.link[k], DIR_W)) out_w[k] = '0;
    end
endmodule
