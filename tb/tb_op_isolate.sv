// tb_op_isolate: random operands and operation codes into the isolation
// stage; every unit's gated operands must equal the raw operands for the
// selected unit only and zero for all others, and nothing is selected when
// the bank is disabled.  A second instance without isolation must pass the
// raw operands to every unit.
module tb_op_isolate;
  localparam int NU = 16, W = 34;
  logic          en;
  logic [3:0]    op;
  logic [W-1:0]  a, b;
  logic [NU-1:0] sel, sel_n;
  logic [W-1:0]  ga [NU], gb [NU], na [NU], nb [NU];
  int checks = 0, failures = 0;

  op_isolate #(.NU(NU), .W(W)) dut (.en(en), .op(op), .a(a), .b(b), .sel(sel), .ga(ga), .gb(gb));
  op_isolate #(.NU(NU), .W(W), .ISOLATE(1'b0)) ref_n (.en(en), .op(op), .a(a), .b(b),
                                                       .sel(sel_n), .ga(na), .gb(nb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s en=%0b op=%0d", what, en, op); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      en = ($urandom_range(0, 7) != 0);
      op = 4'($urandom);
      a  = {2'($urandom), $urandom};
      b  = {2'($urandom), $urandom};
      #1;
      for (int u = 0; u < NU; u++) begin
        logic s;
        s = en && (u == int'(op));
        check(sel[u] == s, "select line");
        check(ga[u] === (s ? a : '0), "gated a");
        check(gb[u] === (s ? b : '0), "gated b");
        check(na[u] === a && nb[u] === b, "no isolation passes operands");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
