// tb_pickin: fills the twelve link inputs with distinct random words and
// checks that each selection code 0..11 returns the expected link (west
// southbound, west northbound, east southbound, east northbound, d0..d2) and
// codes 12..15 return zero.
module tb_pickin;
  import muccra_pkg::*;
  word_t w_s [NLINK], w_n [NLINK], e_s [NLINK], e_n [NLINK];
  logic [3:0] sel0, sel1;
  word_t in0, in1;
  int checks = 0, failures = 0;

  pickin dut (.w_s(w_s), .w_n(w_n), .e_s(e_s), .e_n(e_n), .sel0(sel0), .sel1(sel1), .in0(in0), .in1(in1));

  function automatic word_t expect_of(input int s);
    if (s < 3)  return w_s[s];
    if (s < 6)  return w_n[s-3];
    if (s < 9)  return e_s[s-6];
    if (s < 12) return e_n[s-9];
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < NLINK; k++) begin
        w_s[k] = {2'($urandom), $urandom}; w_n[k] = {2'($urandom), $urandom};
        e_s[k] = {2'($urandom), $urandom}; e_n[k] = {2'($urandom), $urandom};
      end
      for (int s = 0; s < 16; s++) begin
        sel0 = 4'(s); sel1 = 4'(15 - s); #1;
        checks += 2;
        if (in0 !== expect_of(s))      begin failures++; $display("FAIL in0 sel=%0d", s); end
        if (in1 !== expect_of(15 - s)) begin failures++; $display("FAIL in1 sel=%0d", 15 - s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
