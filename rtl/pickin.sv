// pickin: input connection block of a PE.
//
// A PE reads from the vertical routing channels on both of its sides.  Each
// side carries the three links d0..d2 in each direction, so there are twelve
// candidate words: west channel southbound d0..d2 (0..2), west northbound
// (3..5), east southbound (6..8), east northbound (9..11).  Two independent
// multiplexers pick the PE's two operands in0 and in1 from them; codes 12..15
// give zero.
//
// That a PE picks from the vertical channels on both sides is the published
// structure; the number of operands and the code assignment are this design's
// own choices.  Purely combinational.
module pickin
  import muccra_pkg::*;
(
  input  word_t       w_s [NLINK],  // west channel, southbound
  input  word_t       w_n [NLINK],  // west channel, northbound
  input  word_t       e_s [NLINK],  // east channel, southbound
  input  word_t       e_n [NLINK],  // east channel, northbound
  input  logic [3:0]  sel0,
  input  logic [3:0]  sel1,
  output word_t       in0,
  output word_t       in1
);
  word_t cand [16];

  always_comb begin
    for (int i = 0; i < 16; i++) cand[i] = '0;
    for (int k = 0; k < NLINK; k++) begin
      cand[k]     = w_s[k];
      cand[3 + k] = w_n[k];
      cand[6 + k] = e_s[k];
      cand[9 + k] = e_n[k];
    end
  end

  assign in0 = cand[sel0];
  assign in1 = cand[sel1];
endmodule
