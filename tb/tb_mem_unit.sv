// tb_mem_unit: fills the memory through the host port and reads it back
// (one-cycle latency), then lets the context word take over: addresses and
// write data picked from the six segment links, reads injected onto chosen
// links, and writes checked by host read-back.
module tb_mem_unit;
  import muccra_pkg::*;
  logic clk = 0, rst_n = 0;
  mem_cfg_t cfg;
  word_t seg_e [NLINK], seg_w [NLINK], out_e [NLINK], out_w [NLINK];
  logic host_en, host_we;
  logic [7:0] host_addr;
  logic [31:0] host_wdata, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  mem_unit dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .seg_e(seg_e), .seg_w(seg_w), .out_e(out_e),
                .out_w(out_w), .host_en(host_en), .host_we(host_we), .host_addr(host_addr),
                .host_wdata(host_wdata), .rdata(rdata));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rdata=%h", what, rdata); end
  endtask

  function automatic word_t cand(input int s);
    return (s < 3) ? seg_e[s] : seg_w[s-3];
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; host_en = 1; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int k = 0; k < NLINK; k++) begin seg_e[k] = '0; seg_w[k] = '0; end
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); host_we = 1; host_addr = 8'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    for (int i = 0; i < 256; i += 7) begin
      @(negedge clk); host_we = 0; host_addr = 8'(i);
      @(posedge clk); #1 check(rdata === model[i], "host read");
    end
    @(negedge clk); host_en = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int k = 0; k < NLINK; k++) begin
        seg_e[k] = {2'($urandom), $urandom}; seg_w[k] = {2'($urandom), $urandom};
      end
      cfg = '0;
      cfg.addr_sel = 3'($urandom_range(0, 5)); cfg.wdata_sel = 3'($urandom_range(0, 5));
      cfg.we = 1'($urandom); cfg.re = !cfg.we;
      begin
        logic [7:0] a; logic [31:0] d; logic w;
        a = cand(cfg.addr_sel).data[7:0]; d = cand(cfg.wdata_sel).data; w = cfg.we;
        @(posedge clk); #1;
        if (w) model[a] = d;
        else   check(rdata === model[a], "context read, one cycle latency");
      end
      @(negedge clk);
      cfg.we = 0; cfg.re = 0; cfg.inject = 6'($urandom);
      #1;
      for (int k = 0; k < NLINK; k++) begin
        check(out_e[k] === (cfg.inject[0][k] ? word_t'({2'b00, rdata}) : seg_e[k]), "eastbound injection");
        check(out_w[k] === (cfg.inject[1][k] ? word_t'({2'b00, rdata}) : seg_w[k]), "westbound injection");
      end
    end
    @(negedge clk); cfg = '0; host_en = 1; host_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); host_addr = 8'(i);
      @(posedge clk); #1 check(rdata === model[i], "final host read-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
