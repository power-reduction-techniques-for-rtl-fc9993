// tb_alu: drives every ALU operation with random and corner operands and
// compares the 34-bit result with a reference computed here; also checks
// that a disabled ALU outputs zero and that the non-isolated variant gives
// the same results.
module tb_alu;
  import muccra_pkg::*;
  logic    en, cin;
  alu_op_e op;
  word_t   a, b, y, y_n;
  int checks = 0, failures = 0;

  alu dut (.en(en), .op(op), .a(a), .b(b), .cin(cin), .y(y));
  alu #(.ISOLATE(1'b0)) dut_n (.en(en), .op(op), .a(a), .b(b), .cin(cin), .y(y_n));

  function automatic word_t model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z,
                                  input logic c);
    logic [32:0] s;
    word_t r;
    r = '0;
    case (o)
      ALU_ADD:  begin s = {1'b0, x} + {1'b0, z};            r.data = s[31:0]; r.carry[0] = s[32]; end
      ALU_ADDC: begin s = {1'b0, x} + {1'b0, z} + 33'(c);   r.data = s[31:0]; r.carry[0] = s[32]; end
      ALU_SUB:  begin s = {1'b0, x} - {1'b0, z};            r.data = s[31:0]; r.carry[0] = ~s[32]; end
      ALU_SUBC: begin s = {1'b0, x} - {1'b0, z} - 33'(!c);  r.data = s[31:0]; r.carry[0] = ~s[32]; end
      ALU_AND:  r.data = x & z;
      ALU_OR:   r.data = x | z;
      ALU_XOR:  r.data = x ^ z;
      ALU_NAND: r.data = ~(x & z);
      ALU_NOR:  r.data = ~(x | z);
      ALU_XNOR: r.data = ~(x ^ z);
      ALU_NOT:  r.data = ~x;
      ALU_MAX:  r.data = (int'(x) > int'(z)) ? x : z;
      ALU_MIN:  r.data = (int'(x) < int'(z)) ? x : z;
      ALU_EQ:   begin r.carry[1] = (x == z); r.data = {31'b0, x == z}; end
      ALU_LT:   begin r.carry[1] = (int'(x) < int'(z)); r.data = {31'b0, int'(x) < int'(z)}; end
      default:  r.data = {16'b0, x[15:0]} * {16'b0, z[15:0]};
    endcase
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h cin=%0b y=%h", what, op.name(), a, b, cin, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h1234_5678};
    for (int t = 0; t < 3000; t++) begin
      en  = 1'b1;
      op  = alu_op_e'(t % 16);
      cin = 1'($urandom);
      a   = '{carry: 2'($urandom), data: (t % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom};
      b   = '{carry: 2'($urandom), data: (t % 7 == 0) ? corner[$urandom_range(0, 5)] : $urandom};
      if (t % 11 == 0) b.data = a.data;
      #1;
      check(y === model(op, a.data, b.data, cin), "result");
      check(y_n === y, "isolation does not change the result");
      en = 1'b0;
      #1;
      check(y === '0, "disabled ALU outputs zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
