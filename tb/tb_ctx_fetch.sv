// tb_ctx_fetch: loads 32 random context words and a random use-flag word,
// then broadcasts random context pointers.  The configuration one cycle later
// must be the stored word if the context's flag is set (and the memory
// enabled) and the all-zero default otherwise; with no pointer broadcast it
// must be the default.  A second instance without selective fetch must
// always read.
module tb_ctx_fetch;
  logic clk = 0, rst_n = 0;
  logic [4:0]  ptr = 0, cw_addr = 0;
  logic        ptr_valid = 0, cw_we = 0, flag_we = 0;
  logic [63:0] cw_data = 0, cfg, cfg_n;
  logic [31:0] flag_data = 0, flags;
  logic        ce, ce_n;
  logic [63:0] model [32];
  int checks = 0, failures = 0, skipped = 0;

  ctx_fetch #(.W(64), .DEPTH(32)) dut (
    .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid), .cw_we(cw_we), .cw_addr(cw_addr),
    .cw_data(cw_data), .flag_we(flag_we), .flag_data(flag_data), .cfg(cfg), .ce(ce));
  ctx_fetch #(.W(64), .DEPTH(32), .SELECTIVE(1'b0)) dut_n (
    .clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid), .cw_we(cw_we), .cw_addr(cw_addr),
    .cw_data(cw_data), .flag_we(flag_we), .flag_data(flag_data), .cfg(cfg_n), .ce(ce_n));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ptr=%0d cfg=%h", what, ptr, cfg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); cw_we = 1; cw_addr = 5'(i); cw_data = {$urandom, $urandom} | 64'h1;
      model[i] = cw_data;
    end
    @(negedge clk); cw_we = 0; flag_we = 1; flags = $urandom; flag_data = flags;
    @(negedge clk); flag_we = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ptr = 5'($urandom); ptr_valid = ($urandom_range(0, 5) != 0);
      #1;
      check(ce === (ptr_valid && flags[ptr]), "chip enable follows the flag");
      check(ce_n === ptr_valid, "reference always reads");
      @(posedge clk); #1;
      if (ptr_valid && flags[ptr]) check(cfg === model[ptr], "fetched word");
      else begin
        check(cfg === '0, "default word");
        skipped++;
      end
      check(cfg_n === (ptr_valid ? model[ptr] : '0), "reference word");
    end
    check(skipped > 0, "some fetches skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
