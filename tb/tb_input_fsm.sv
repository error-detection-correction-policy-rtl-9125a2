// tb_input_fsm: self-checking test of the IDLE/EVENT input state machine.
// Drives directed character sequences (normal event, doubled Begin and End,
// characters in IDLE, violations and unknown specials in an event, reframing,
// FIFO almost full, SCL_INITIALIZE) and compares the FIFO writes and the
// counter pulses with hand-worked expected lists.
module tb_input_fsm;
  import l2_link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, reframing = 1'b0;
  logic fifo_afull = 1'b0, fifo_full = 1'b0;
  link_sym_t rx_sym = '0;
  logic fifo_wr, in_event;
  fifo_entry_t fifo_wdata;
  fsm_events_t ev;
  int checks = 0, failures = 0;

  input_fsm dut (.*);

  always #5 clk = ~clk;

  fifo_entry_t got[$];
  int n_begin, n_end, n_mend, n_mbeg, n_idata, n_ierr, n_iother, n_everr, n_ovf;
  always @(posedge clk) begin
    if (fifo_wr) got.push_back(fifo_wdata);
    n_begin  += int'(ev.begin_evt);   n_end   += int'(ev.end_evt);
    n_mend   += int'(ev.missed_end);  n_mbeg  += int'(ev.missed_begin);
    n_idata  += int'(ev.idle_data);   n_ierr  += int'(ev.idle_err);
    n_iother += int'(ev.idle_other);  n_everr += int'(ev.event_err);
    n_ovf    += int'(ev.overflow);
  end

  task automatic send(sym_kind_e k, logic [7:0] c);
    @(negedge clk);
    rx_sym = '{valid: 1'b1, kind: k, code: c};
    @(negedge clk);
    rx_sym = '0;
  endtask
  task automatic dat(logic [7:0] c); send(SYM_DATA, c);    endtask
  task automatic spc(logic [7:0] c); send(SYM_SPECIAL, c); endtask

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, a, b);
    end
  endtask

  task automatic expect_writes(fifo_entry_t exp[$]);
    check("write count", got.size(), exp.size());
    foreach (exp[i]) if (i < got.size()) begin
      check($sformatf("write %0d tag", i), int'(got[i].tag), int'(exp[i].tag));
      check($sformatf("write %0d byte", i), int'(got[i].data), int'(exp[i].data));
    end
    got.delete();
  endtask

  function automatic fifo_entry_t E(fifo_tag_e t, logic [7:0] d);
    return '{tag: t, data: d};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // characters in IDLE, then an event with errors and a doubled Begin
    spc(SC_PAD); dat(8'h11); send(SYM_VIOL, 8'h5A); spc(8'd5); spc(SC_END);
    check("idle after missed begin", int'(in_event), 0);
    spc(SC_BEGIN);
    check("event after begin", int'(in_event), 1);
    dat(8'hAA); spc(SC_PAD); send(SYM_VIOL, 8'h33); spc(8'd7); spc(8'd200);
    spc(SC_BEGIN);
    check("still event after 2nd begin", int'(in_event), 1);
    dat(8'hBB); spc(SC_END);
    check("idle after end", int'(in_event), 0);
    dat(8'hCC); spc(SC_END);
    expect_writes('{E(TAG_DATA, 8'hAA), E(TAG_ERROR, 8'h33), E(TAG_ERROR, 8'd7),
                    E(TAG_ERROR, 8'd200), E(TAG_END, 8'h01), E(TAG_DATA, 8'hBB),
                    E(TAG_END, 8'h00)});
    check("begins", n_begin, 1);      check("ends", n_end, 1);
    check("missed ends", n_mend, 1);  check("missed begins", n_mbeg, 2);
    check("idle data", n_idata, 2);   check("idle errors", n_ierr, 1);
    check("idle other", n_iother, 1); check("event errors", n_everr, 3);
    // reframing inside an event: nothing written, flag in the END mark
    spc(SC_BEGIN); dat(8'h01);
    reframing = 1'b1; dat(8'h02); spc(SC_END); reframing = 1'b0;
    check("reframing kept state", int'(in_event), 1);
    dat(8'h03); spc(SC_END);
    expect_writes('{E(TAG_DATA, 8'h01), E(TAG_DATA, 8'h03), E(TAG_END, 8'h02)});
    // almost full: data dropped, END still written with the overflow flag
    spc(SC_BEGIN); fifo_afull = 1'b1; dat(8'h04); fifo_afull = 1'b0; spc(SC_END);
    expect_writes('{E(TAG_END, 8'h04)});
    check("overflows", n_ovf, 1);
    // next event starts with clean flags
    spc(SC_BEGIN); dat(8'h05); spc(SC_END);
    expect_writes('{E(TAG_DATA, 8'h05), E(TAG_END, 8'h00)});
    // SCL_INITIALIZE returns to IDLE
    spc(SC_BEGIN);
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    check("idle after clear", int'(in_event), 0);
    dat(8'h09);
    expect_writes('{});
    check("idle data after clear", n_idata, 3);
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
