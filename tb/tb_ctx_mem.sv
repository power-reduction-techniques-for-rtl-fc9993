// tb_ctx_mem: fills all 32 contexts, then reads them back in random order
// with chip enable high (data must appear exactly one cycle after the
// address) and checks that with chip enable low the output holds.
module tb_ctx_mem;
  logic clk = 0, rst_n = 0, we = 0, ce = 0;
  logic [4:0]  waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, dout;
  logic [63:0] model [32];
  int checks = 0, failures = 0;

  ctx_mem #(.W(64), .DEPTH(32)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                                     .ce(ce), .raddr(raddr), .dout(dout));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s raddr=%0d dout=%h", what, raddr, dout); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    check(dout === '0, "reset output");
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      logic [63:0] prev;
      @(negedge clk);
      ce = 1; raddr = 5'($urandom);
      prev = dout;
      #1 check(dout === prev, "no change ahead of the clock edge");
      @(posedge clk); #1;
      check(dout === model[raddr], "read one cycle after the address");
      @(negedge clk); ce = 0; prev = dout; raddr = raddr + 5'd1;
      @(posedge clk); #1;
      check(dout === prev, "output holds while chip enable is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
