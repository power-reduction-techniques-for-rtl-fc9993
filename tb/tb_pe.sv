// tb_pe: loads a PE's context memory and use flags through its load ports,
// then steps through contexts with random words on the vertical channels.
// Checked: operands picked from the west and east channels, results driven
// onto the chosen horizontal links one cycle after their context, links
// passed through otherwise, and that a context whose flag is clear is not
// fetched (chip enable low) and leaves the PE idle.
module tb_pe;
  import muccra_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0]  ptr = 0, cw_addr = 0, br_off;
  logic        ptr_valid = 0, cw_we = 0, flag_we = 0, ce, br_cond;
  logic [63:0] cw_data = 0;
  logic [31:0] flag_data = 0;
  word_t w_s [NLINK], w_n [NLINK], e_s [NLINK], e_n [NLINK];
  word_t up_e [NLINK], up_w [NLINK], out_e [NLINK], out_w [NLINK];
  int checks = 0, failures = 0;

  pe dut (.clk(clk), .rst_n(rst_n), .ptr(ptr), .ptr_valid(ptr_valid), .cw_we(cw_we), .cw_addr(cw_addr),
          .cw_data(cw_data), .flag_we(flag_we), .flag_data(flag_data), .w_s(w_s), .w_n(w_n),
          .e_s(e_s), .e_n(e_n), .up_e(up_e), .up_w(up_w), .out_e(out_e), .out_w(out_w),
          .br_cond(br_cond), .br_off(br_off), .fetch_ce(ce));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ptr=%0d", what, ptr); end
  endtask

  function automatic word_t link_of(input int s);
    if (s < 3) return w_s[s];
    if (s < 6) return w_n[s-3];
    if (s < 9) return e_s[s-6];
    return e_n[s-9];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_cfg_t c;
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); cw_we = 1; cw_addr = 5'(i);
      // contexts with odd numbers add two picked links and drive the sum on
      // eastbound link (i%3) and westbound link ((i+1)%3); even ones are unused
      c = '0;
      c.in0_sel = 4'(i % 12); c.in1_sel = 4'((i * 5 + 3) % 12);
      c.alu_en = 1; c.alu_op = ALU_ADD; c.alu_a = ASRC_IN0; c.alu_b = BSRC_IN1;
      c.pout[0][i % 3] = POUT_ALU; c.pout[1][(i + 1) % 3] = POUT_ALU;
      cw_data = 64'(c);
    end
    @(negedge clk); cw_we = 0; flag_we = 1; flag_data = 32'haaaa_aaaa;
    @(negedge clk); flag_we = 0;
    for (int t = 0; t < 500; t++) begin
      int p;
      logic [31:0] sum;
      word_t prev_alu;
      p = $urandom_range(0, 31);
      @(negedge clk);
      ptr = 5'(p); ptr_valid = 1;
      #1 check(ce === p[0], "chip enable only for used contexts");
      for (int k = 0; k < NLINK; k++) begin
        w_s[k] = {2'b00, $urandom}; w_n[k] = {2'b00, $urandom};
        e_s[k] = {2'b00, $urandom}; e_n[k] = {2'b00, $urandom};
        up_e[k] = {2'b11, $urandom}; up_w[k] = {2'b11, $urandom};
      end
      prev_alu = dut.u_core.alu_q;
      @(posedge clk); #1;
      // context p is now in force
      ptr_valid = 0;
      sum = link_of(p % 12).data + link_of((p * 5 + 3) % 12).data;
      @(posedge clk); #1;
      // its result is registered; the same context drives it out
      if (p[0]) begin
        check(dut.u_core.alu_q.data === sum, "sum of picked operands");
      end else begin
        check(dut.u_core.alu_q === prev_alu, "unused context leaves the PE idle");
      end
      for (int k = 0; k < NLINK; k++) begin
        check(out_e[k] === up_e[k] && out_w[k] === up_w[k], "links pass through in the idle word");
      end
    end
    // driving out: keep an odd context in force for two cycles
    for (int t = 0; t < 50; t++) begin
      int p;
      p = 2 * $urandom_range(0, 15) + 1;
      @(negedge clk); ptr = 5'(p); ptr_valid = 1;
      @(negedge clk);
      @(negedge clk); ptr_valid = 0;
      for (int k = 0; k < NLINK; k++) begin
        check(out_e[k] === ((k == p % 3) ? dut.u_core.alu_q : up_e[k]), "eastbound pickout");
        check(out_w[k] === ((k == (p + 1) % 3) ? dut.u_core.alu_q : up_w[k]), "westbound pickout");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
