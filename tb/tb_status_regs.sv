// tb_status_regs: self-checking test of the counter and control registers.
// Pulses each counter input a known random number of times (several at
// once), reads every counter back over the register port, checks the
// control bits, the write-one pulses, the read-only words, saturation at
// 0xFFFF and the counter clear.
module tb_status_regs;
  localparam int unsigned NCNT = 14;
  logic clk = 1'b0, rst_n = 1'b0, reg_wr = 1'b0;
  logic [4:0] reg_addr = '0;
  logic [15:0] reg_wdata = '0, reg_rdata, status_in = 16'hA5C3, selftest_cnt = 16'd77;
  logic [15:0] fifo_level = 16'd300;
  logic [NCNT-1:0] cnt_inc = '0;
  logic selftest_en, tx_hold, reframe_req, led_clr, cnt_clr;
  int checks = 0, failures = 0;
  int exp_cnt[NCNT];
  int n_rf = 0, n_led = 0, n_clr = 0;

  status_regs #(.NCNT(NCNT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_rf += int'(reframe_req); n_led += int'(led_clr); n_clr += int'(cnt_clr);
  end

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask
  task automatic wr(logic [4:0] a, logic [15:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1'b1;
    @(negedge clk); reg_wr = 1'b0;
  endtask
  task automatic rdchk(string what, logic [4:0] a, int exp);
    reg_addr = a;
    #1;
    check(what, int'(reg_rdata), exp);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      for (int i = 0; i < NCNT; i++) begin
        cnt_inc[i] = ($urandom % (i + 2)) == 0;
        exp_cnt[i] += int'(cnt_inc[i]);
      end
    end
    @(negedge clk); cnt_inc = '0;
    for (int i = 0; i < NCNT; i++) rdchk($sformatf("counter %0d", i), 5'(16 + i), exp_cnt[i]);
    rdchk("status word", 5'd1, 'hA5C3);
    rdchk("self-test count", 5'd2, 77);
    rdchk("fifo level", 5'd3, 300);
    rdchk("unused address", 5'd31, 0);
    wr(5'd0, 16'h0011);
    check("self-test enable", int'(selftest_en), 1);
    check("transmit hold", int'(tx_hold), 1);
    rdchk("control readback", 5'd0, 'h0011);
    wr(5'd0, 16'h0013);
    wr(5'd0, 16'h0015);
    check("reframe pulses", n_rf, 1);
    check("led clear pulses", n_led, 1);
    rdchk("control bits kept", 5'd0, 'h0011);
    wr(5'd0, 16'h0008);
    check("counter clear pulse", n_clr, 1);
    rdchk("cleared", 5'd16, 0);
    check("self-test disabled", int'(selftest_en), 0);
    // saturation
    @(negedge clk); cnt_inc = 14'h1;
    repeat (65540) @(negedge clk);
    cnt_inc = '0;
    rdchk("saturated", 5'd16, 'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
