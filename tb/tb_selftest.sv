// tb_selftest: self-checking test of the link self-test pair.
// The generator drives the checker directly. Checks the generator's sequence
// (every data byte, then every special character, repeating; one `wrap` per
// pass of 256 + NUM_SPECIAL symbols), that the checker passes it without
// errors and pulses `pass` once per pass, that one corrupted symbol and one
// violation count one error each, and that the counter clears.
module tb_selftest;
  import l2_link_pkg::*;

  localparam int SEQ_LEN = 256 + NUM_SPECIAL;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, cnt_clr = 1'b0;
  link_sym_t g_sym, c_sym;
  logic wrap, err, pass;
  logic [15:0] err_cnt;
  int checks = 0, failures = 0;
  int corrupt = 0;      // 1: flip a data bit, 2: violation, on the next symbol

  selftest_gen u_gen (.clk, .rst_n, .enable, .tx_sym(g_sym), .wrap);
  selftest_chk u_chk (.clk, .rst_n, .enable, .cnt_clr, .rx_sym(c_sym), .err, .pass, .err_cnt);

  always #5 clk = ~clk;

  always_comb begin
    c_sym = g_sym;
    if (corrupt == 1) c_sym.code = g_sym.code ^ 8'h10;
    if (corrupt == 2) c_sym.kind = SYM_VIOL;
    if (corrupt == 3) begin                 // from now on one symbol ahead
      logic [8:0] p;
      p = {g_sym.kind == SYM_SPECIAL, g_sym.code};
      p = (p == 9'(SEQ_LEN - 1)) ? 9'd0 : p + 1'b1;
      c_sym.kind = p[8] ? SYM_SPECIAL : SYM_DATA;
      c_sym.code = p[7:0];
    end
  end

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask

  int n_wrap = 0, n_pass = 0, pos = 0, seq_err = 0;
  always @(posedge clk) if (enable) begin
    int exp_kind, exp_code;
    exp_kind = pos < 256 ? int'(SYM_DATA) : int'(SYM_SPECIAL);
    exp_code = pos < 256 ? pos : pos - 256;
    if (!g_sym.valid || int'(g_sym.kind) != exp_kind || int'(g_sym.code) != exp_code)
      seq_err++;
    n_wrap += int'(wrap);
    pos = (pos + 1) % SEQ_LEN;
  end
  always @(posedge clk) n_pass += int'(pass);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); enable = 1'b1;
    repeat (3 * SEQ_LEN + 2) @(negedge clk);
    check("sequence order", seq_err, 0);
    check("wrap pulses", n_wrap, 3);
    check("pass pulses", n_pass, 3);
    check("no errors", int'(err_cnt), 0);
    repeat (40) @(negedge clk);
    corrupt = 1; @(negedge clk); corrupt = 0;
    repeat (40) @(negedge clk);
    check("one corrupted symbol, one error", int'(err_cnt), 1);
    corrupt = 2; @(negedge clk); corrupt = 0;
    repeat (40) @(negedge clk);
    check("one violation, one error", int'(err_cnt), 2);
    // a lost symbol (slip): two errors, then in step again
    begin
      int np;
      np = n_pass;
      corrupt = 3;
      repeat (SEQ_LEN + 2) @(negedge clk);
      check("slip, two errors", int'(err_cnt), 4);
      check("pass after slip", n_pass - np, 1);
      corrupt = 0;                        // one symbol back: two more errors
      repeat (4) @(negedge clk);
      check("slip back, two errors", int'(err_cnt), 6);
    end
    cnt_clr = 1'b1; @(negedge clk); cnt_clr = 1'b0;
    check("cleared", int'(err_cnt), 0);
    enable = 1'b0; @(negedge clk);
    check("stopped", int'(g_sym.valid), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
