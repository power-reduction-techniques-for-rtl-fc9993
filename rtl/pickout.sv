// pickout: output connection block of a PE.
//
// The PE sits under a horizontal routing segment that has three eastbound and
// three westbound links.  For each of these six links the block either passes
// on what the switching element upstream drives (POUT_PASS) or replaces it
// with the ALU output, the SMU output or the register-file read port.  This
// lets any PE output leave in either direction on any link.
//
// That all PE outputs can reach the horizontal links in any direction is the
// published behaviour; driving the segment on the PE's north side and the
// pass-or-replace structure are this design's own choices.  Purely
// combinational.
//
// Interface: sel[dir][link] (dir 0 = eastbound, 1 = westbound), the upstream
// words up_e/up_w, the three PE outputs; the words leaving on each link.
module pickout
  import muccra_pkg::*;
(
  input  pout_e [1:0][NLINK-1:0] sel,
  input  word_t   up_e  [NLINK],   // eastbound, from the SE to the west
  input  word_t   up_w  [NLINK],   // westbound, from the SE to the east
  input  word_t   alu_q,
  input  word_t   smu_q,
  input  word_t   rf_q,
  output word_t   out_e [NLINK],
  output word_t   out_w [NLINK]
);
  function automatic word_t pick(input pout_e s, input word_t up, input word_t a,
                                 input word_t m, input word_t r);
    unique case (s)
      POUT_ALU: return a;
      POUT_SMU: return m;
      POUT_RF:  return r;
      default:  return up;
    endcase
  endfunction

  always_comb
    for (int k = 0; k < NLINK; k++) out_e[k] = pick(sel[0][k], up_e[k], alu_q, smu_q, rf_q);

  always_comb
    for (int k = 0; k < NLINK; k++) out_w[k] = pick(sel[1][k], up_w[k], alu_q, smu_q, rf_q);
endmodule
