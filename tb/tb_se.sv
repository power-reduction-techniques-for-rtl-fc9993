// tb_se: loads 32 random SE contexts and flags, then runs random context
// pointers with random words on all inputs.  Every output link is compared
// with a model of the per-link source/mask routing, with words from the north
// delayed by one cycle; contexts whose flag is clear must route nothing.
module tb_se;
  import muccra_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0]  ptr = 0, cw_addr = 0;
  logic        ptr_valid = 0, cw_we = 0, flag_we = 0, ce;
  logic [63:0] cw_data = 0;
  logic [31:0] flag_data = 0, flags;
  word_t in_n [NLINK], in_e [NLINK], in_s [NLINK], in_w [NLINK];
  word_t out_n [NLINK], out_e [NLINK], out_s [NLINK], out_w [NLINK];
  word_t nq [NLINK];
  se_cfg_t ctx [32];
  int checks = 0, failures = 0, splits = 0, north = 0;

  se dut (.clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid), .cw_we(cw_we), .cw_addr(cw_addr),
          .cw_data(cw_data), .flag_we(flag_we), .flag_data(flag_data),
          .in_n(in_n), .in_e(in_e), .in_s(in_s), .in_w(in_w),
          .out_n(out_n), .out_e(out_e), .out_s(out_s), .out_w(out_w), .fetch_ce(ce));
  always #5 clk = ~clk;

  function automatic word_t model(input se_cfg_t c, input int d, input int k);
    int s;
    s = int'(c.link[k].src);
    for (int i = 0; i < 3; i++)
      if (c.link[k].dmask[i] && ((s + i + 1) % 4) == d)
        case (s)
          0: return nq[k];
          1: return in_e[k];
          2: return in_s[k];
          default: return in_w[k];
        endcase
    return '0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ptr=%0d", what, ptr); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    se_cfg_t cur;
    for (int k = 0; k < NLINK; k++) begin in_n[k] = '0; in_e[k] = '0; in_s[k] = '0; in_w[k] = '0; end
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); cw_we = 1; cw_addr = 5'(i); ctx[i] = se_cfg_t'(15'($urandom));
      cw_data = 64'(ctx[i]);
    end
    @(negedge clk); cw_we = 0; flag_we = 1; flags = $urandom | 32'h1; flag_data = flags;
    @(negedge clk); flag_we = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ptr = 5'($urandom); ptr_valid = 1;
      cur = flags[ptr] ? ctx[ptr] : '0;
      @(posedge clk);
      for (int k = 0; k < NLINK; k++) nq[k] = in_n[k];
      #1;
      for (int k = 0; k < NLINK; k++) begin
        in_n[k] = {2'($urandom), $urandom}; in_e[k] = {2'($urandom), $urandom};
        in_s[k] = {2'($urandom), $urandom}; in_w[k] = {2'($urandom), $urandom};
        if ($countones(cur.link[k].dmask) > 1) splits++;
        if (cur.link[k].src == DIR_N && cur.link[k].dmask != 0) north++;
      end
      #1;
      for (int k = 0; k < NLINK; k++) begin
        check(out_n[k] === model(cur, 0, k), "north output");
        check(out_e[k] === model(cur, 1, k), "east output");
        check(out_s[k] === model(cur, 2, k), "south output");
        check(out_w[k] === model(cur, 3, k), "west output");
      end
    end
    check(splits > 0 && north > 0, "split and north-register routes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
