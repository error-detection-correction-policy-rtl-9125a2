// tb_reframe_ctrl: self-checking test of the reframing controller.
// Checks power-up reframing, exit on a Pad only, reframing after N_BAD
// consecutive violations or unknown specials (and not after N_BAD-1 broken
// by a good character), front-panel and register requests, loss of PLL
// lock, the reframe
// pulse count and the LED flip-flop with its clear.
module tb_reframe_ctrl;
  import l2_link_pkg::*;

  localparam int unsigned N_BAD = 4;
  logic clk = 1'b0, rst_n = 1'b0, fp_req = 1'b0, reg_req = 1'b0, led_clr = 1'b0;
  logic link_lock = 1'b1;
  link_sym_t rx_sym = '0;
  logic reframing, rf_en, reframe_pulse, led;
  int checks = 0, failures = 0, pulses = 0;

  reframe_ctrl #(.N_BAD(N_BAD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) pulses += int'(reframe_pulse);

  task automatic send(sym_kind_e k, logic [7:0] c);
    @(negedge clk); rx_sym = '{valid: 1'b1, kind: k, code: c};
    @(negedge clk); rx_sym = '0;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0;
  endtask
  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("power-up reframing", int'(reframing), 1);
    check("rf_en follows", int'(rf_en), 1);
    send(SYM_DATA, 8'h00); send(SYM_SPECIAL, SC_BEGIN); send(SYM_VIOL, 8'h00);
    check("only a pad ends reframing", int'(reframing), 1);
    send(SYM_SPECIAL, SC_PAD);
    check("pad ends reframing", int'(reframing), 0);
    check("led set at power-up", int'(led), 1);
    pulse(led_clr);
    check("led cleared", int'(led), 0);
    // N_BAD-1 bad, then a good one: no reframe
    repeat (N_BAD - 1) send(SYM_VIOL, 8'h00);
    send(SYM_DATA, 8'h12);
    repeat (N_BAD - 1) send(SYM_SPECIAL, 8'd100);
    check("no reframe below n", int'(reframing), 0);
    // one more unknown special makes N_BAD in a row
    send(SYM_SPECIAL, 8'd200);
    check("reframe after n bad", int'(reframing), 1);
    check("led set again", int'(led), 1);
    send(SYM_SPECIAL, SC_PAD);
    check("recovered", int'(reframing), 0);
    // pads ignored, mixing violation and unknown special counts as bad
    send(SYM_VIOL, 8'h0); send(SYM_SPECIAL, 8'd13); send(SYM_SPECIAL, SC_PAD);
    send(SYM_VIOL, 8'h0); send(SYM_VIOL, 8'h0);
    check("pad resets the run", int'(reframing), 0);
    pulse(fp_req);
    check("front panel request", int'(reframing), 1);
    send(SYM_SPECIAL, SC_PAD);
    pulse(reg_req);
    check("register request", int'(reframing), 1);
    send(SYM_SPECIAL, SC_PAD);
    check("recovered again", int'(reframing), 0);
    // loss of PLL lock: reframing, and a Pad does not end it until locked
    @(negedge clk); link_lock = 1'b0;
    send(SYM_SPECIAL, SC_PAD);
    check("lock loss reframes", int'(reframing), 1);
    @(negedge clk); link_lock = 1'b1;
    send(SYM_DATA, 8'h01);
    check("locked, waiting for pad", int'(reframing), 1);
    send(SYM_SPECIAL, SC_PAD);
    check("recovered after lock", int'(reframing), 0);
    check("reframe pulses", pulses, 5);  // power-up, bad run, panel, register, lock
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
