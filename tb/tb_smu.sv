// tb_smu: every Shift & Mask operation with random words, amounts and
// immediates against a reference written here; a disabled SMU must output
// zero and the non-isolated variant must agree.
module tb_smu;
  import muccra_pkg::*;
  logic        en;
  smu_op_e     op;
  word_t       a, y, y_n;
  logic [4:0]  amt;
  logic [13:0] imm;
  int checks = 0, failures = 0;

  smu dut (.en(en), .op(op), .a(a), .amt(amt), .imm(imm), .y(y));
  smu #(.ISOLATE(1'b0)) dut_n (.en(en), .op(op), .a(a), .amt(amt), .imm(imm), .y(y_n));

  function automatic word_t model(input smu_op_e o, input word_t w, input int n, input logic [13:0] im);
    logic [31:0] x, r;
    logic [63:0] xx;
    x = w.data;
    xx = {x, x};
    r = '0;
    case (o)
      SMU_SLL:    r = x << n;
      SMU_SRL:    r = x >> n;
      SMU_SRA:    r = 32'(int'(x) >>> n);
      SMU_ROL:    r = xx[63 - n -: 32];
      SMU_ROR:    r = xx[n +: 32];
      SMU_MASKL:  for (int i = 0; i < n; i++) r[i] = x[i];
      SMU_MASKH:  for (int i = n; i < 32; i++) r[i] = x[i];
      SMU_BYTE:   r = {24'b0, x[8*(n%4) +: 8]};
      SMU_HALF:   r = {16'b0, x[16*(n%2) +: 16]};
      SMU_SEXT8:  r = 32'(signed'(x[7:0]));
      SMU_SEXT16: r = 32'(signed'(x[15:0]));
      SMU_BSWAP:  r = {x[7:0], x[15:8], x[23:16], x[31:24]};
      SMU_BITREV: for (int i = 0; i < 32; i++) r[i] = x[31-i];
      SMU_PASS:   return w;
      SMU_POPCNT: r = $countones(x);
      default:    r = 32'(signed'(im));
    endcase
    return '{carry: 2'b00, data: r};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s op=%s a=%h amt=%0d y=%h", what, op.name(), a, amt, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      en  = 1'b1;
      op  = smu_op_e'(t % 16);
      a   = '{carry: 2'($urandom), data: $urandom};
      amt = 5'($urandom);
      imm = 14'($urandom);
      #1;
      check(y === model(op, a, int'(amt), imm), "result");
      check(y_n === y, "isolation does not change the result");
      en = 1'b0;
      #1;
      check(y === '0, "disabled SMU outputs zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
