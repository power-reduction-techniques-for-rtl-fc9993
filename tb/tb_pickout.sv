// tb_pickout: random selections per direction and link; each outgoing word
// must be the upstream word (pass) or the ALU, SMU or register-file output.
module tb_pickout;
  import muccra_pkg::*;
  pout_e [1:0][NLINK-1:0] sel;
  word_t up_e [NLINK], up_w [NLINK], out_e [NLINK], out_w [NLINK];
  word_t alu_q, smu_q, rf_q;
  int checks = 0, failures = 0;

  pickout dut (.sel(sel), .up_e(up_e), .up_w(up_w), .alu_q(alu_q), .smu_q(smu_q), .rf_q(rf_q),
               .out_e(out_e), .out_w(out_w));

  function automatic word_t expect_of(input pout_e s, input word_t up);
    case (s)
      POUT_PASS: return up;
      POUT_ALU:  return alu_q;
      POUT_SMU:  return smu_q;
      default:   return rf_q;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      alu_q = {2'($urandom), $urandom}; smu_q = {2'($urandom), $urandom}; rf_q = {2'($urandom), $urandom};
      for (int k = 0; k < NLINK; k++) begin
        up_e[k] = {2'($urandom), $urandom}; up_w[k] = {2'($urandom), $urandom};
        sel[0][k] = pout_e'($urandom_range(0, 3)); sel[1][k] = pout_e'($urandom_range(0, 3));
      end
      #1;
      for (int k = 0; k < NLINK; k++) begin
        checks += 2;
        if (out_e[k] !== expect_of(sel[0][k], up_e[k])) begin failures++; $display("FAIL east link %0d", k); end
        if (out_w[k] !== expect_of(sel[1][k], up_w[k])) begin failures++; $display("FAIL west link %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
