// tb_rfile: random writes and reads against a model of the eight entries;
// checks reset to zero, write-then-read in the next cycle and that a
// disabled write leaves the entry unchanged.
module tb_rfile;
  import muccra_pkg::*;
  logic clk = 0, rst_n = 0, we;
  logic [2:0] waddr, raddr;
  word_t wdata, rdata;
  word_t model [8];
  int checks = 0, failures = 0;

  rfile dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s raddr=%0d got=%h", what, raddr, rdata); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      raddr = 3'(i); #1;
      check(rdata === '0, "reset value");
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = {2'($urandom), $urandom};
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      we = 0;
      raddr = waddr; #1;
      check(rdata === model[raddr], "read after write");
      raddr = 3'($urandom); #1;
      check(rdata === model[raddr], "random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
