// tb_l2_link_top: end-to-end test of the L2 link, transmitter looped back to
// receiver through a channel model that can damage the character stream.
//
// Runs the design at its default parameters. Events are generated with a
// real L2 header and random objects; the expected output of each (the event,
// its logical trailer and zero padding as the receiver must see them, plus
// the 2-byte physical trailer) is computed here from the format rules. The
// scenarios make every mechanism of the design happen and count it:
//   clean events, a violation inside an event, a lost End (boundary inserted
//   at the next Begin), a lost Begin (event discarded, counted), a stray
//   special character between events, a burst of bad characters between
//   events and inside an event, loss of PLL lock and
//   a front-panel request (reframing), an event
//   with the wrong bunch # (event synchronisation error, cleared by
//   SCL_INITIALIZE), a full FIFO (L1 Busy, overflow, then SCL_INITIALIZE
//   clearing the buffers), transmit hold, the self-test sequence, and the
//   largest event an L2 header can describe (255 objects of 255 words).
// At the end the error counters are read over the register port and compared
// with the numbers of each damage injected, and a per-mechanism count is
// printed (any mechanism that never happened is a failure).
module tb_l2_link_top;
  import l2_link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scl_init = 1'b0, fp_reframe = 1'b0, rx_lock = 1'b1;
  logic [7:0] scl_bunch;
  logic l1_busy, sync_error, rf_en, led, selftest_pass, selftest_err, selftest_wrap;
  logic ev_in_valid, ev_in_ready, ev_out_valid, ev_out_ready = 1'b1;
  byte_beat_t ev_in_beat, ev_out_beat;
  link_sym_t tx_sym, rx_sym;
  logic chk_done;
  logic [4:0] chk_flags;
  logic [7:0] chk_bunch, chk_phys_status;
  logic [4:0] reg_addr = '0;
  logic reg_wr = 1'b0;
  logic [15:0] reg_wdata = '0, reg_rdata;

  int checks = 0, failures = 0;

  l2_link_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask

  // ---------------------------------------------------------------- source
  byte_beat_t srcq[$];
  assign ev_in_valid = srcq.size() != 0;
  assign ev_in_beat  = (srcq.size() != 0) ? srcq[0] : '0;
  always @(posedge clk) if (ev_in_valid && ev_in_ready) void'(srcq.pop_front());

  typedef struct {
    logic [7:0] bytes[$];   // expected output bytes, physical trailer included
    bit         cmp_bytes;  // compare the bytes (false where damage changes them)
    logic [7:0] status;     // expected physical-trailer status byte
    logic [7:0] bunch;      // bunch # the timing system expects
    logic [4:0] flags;      // expected check flags
    bit         cmp_flags;
  } exp_t;
  exp_t expq[$];
  assign scl_bunch = (expq.size() != 0) ? expq[0].bunch : 8'h00;

  int n_sent = 0;
  // queue one event; returns its expected record (not yet in expq)
  task automatic make_event(output exp_t e, input int nobj, input int olen, input logic [7:0] bx);
    logic [7:0] b[$];
    logic [7:0] le, lo, lp;
    b = '{8'(nobj), 8'd3, 8'(olen), 8'h21, 8'h42, bx, 8'(n_sent), 8'(n_sent >> 8),
          8'd7, 8'd1, 8'h00, 8'h00};
    for (int i = 0; i < nobj * olen * 4; i++) b.push_back(8'($urandom));
    foreach (b[i]) srcq.push_back('{data: b[i], last: i == b.size() - 1});
    le = '0; lo = '0;
    foreach (b[i]) if (i % 2 == 0) le ^= b[i]; else lo ^= b[i];
    b.push_back(bx); b.push_back(8'h42); b.push_back(le); b.push_back(lo);
    while (b.size() % 16 != 0) b.push_back(8'h00);
    lp = '0;
    foreach (b[i]) lp ^= b[i];
    b.push_back(lp);
    b.push_back(8'(TYPE_SLIC));
    e.bytes = b; e.cmp_bytes = 1'b1; e.status = 8'(TYPE_SLIC); e.bunch = bx;
    e.flags = '0; e.cmp_flags = 1'b1;
    n_sent++;
  endtask

  // ---------------------------------------------------------------- channel
  // one-cycle link; damage is requested by setting these before an event
  int drop_end = 0, drop_begin = 0, viol_data_at = -1, burst_at = -1, burst_len = 0;
  int burst_idle = 0, stray_special = 0;
  int data_idx = 0;
  always @(posedge clk) begin
    link_sym_t s;
    s = tx_sym;
    if (s.kind == SYM_SPECIAL && s.code == SC_BEGIN) data_idx = 0;
    if (drop_end > 0 && s.kind == SYM_SPECIAL && s.code == SC_END) begin
      s.code = SC_PAD; drop_end--;
    end else if (drop_begin > 0 && s.kind == SYM_SPECIAL && s.code == SC_BEGIN) begin
      s.code = SC_PAD; drop_begin--;
    end else if (stray_special > 0 && s.kind == SYM_SPECIAL && s.code == SC_PAD) begin
      s.code = 8'd5; stray_special--;
    end else if (burst_idle > 0 && s.kind == SYM_SPECIAL && s.code == SC_PAD) begin
      s.kind = SYM_VIOL; burst_idle--;
    end else if (s.kind == SYM_DATA) begin
      if (data_idx == viol_data_at) begin s.kind = SYM_VIOL; viol_data_at = -1; end
      if (burst_at >= 0 && data_idx >= burst_at && data_idx < burst_at + burst_len) begin
        s.kind = SYM_VIOL;
        if (data_idx == burst_at + burst_len - 1) burst_at = -1;
      end
      data_idx++;
    end
    rx_sym <= s;
  end

  // ---------------------------------------------------------------- monitor
  logic [7:0] cur[$];
  int n_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_out_valid && ev_out_ready) begin
      cur.push_back(ev_out_beat.data);
      if (ev_out_beat.last) begin
        exp_t e;
        n_out++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected event");
        end else begin
          e = expq[0];
          checks++;
          if (cur[$] !== e.status) begin
            failures++; $display("FAIL event %0d status %h expected %h", n_out, cur[$], e.status);
          end
          if (e.cmp_bytes) begin
            checks++;
            if (cur.size() != e.bytes.size()) begin
              failures++; $display("FAIL event %0d length %0d expected %0d", n_out, cur.size(), e.bytes.size());
            end else foreach (cur[i]) if (cur[i] !== e.bytes[i]) begin
              failures++; $display("FAIL event %0d byte %0d", n_out, i); break;
            end
          end
        end
        cur.delete();
      end
    end
    if (chk_done) begin
      exp_t e;
      e = expq.pop_front();
      if (e.cmp_flags) begin
        checks++;
        if (chk_flags !== e.flags) begin
          failures++; $display("FAIL event %0d flags %b expected %b", n_out, chk_flags, e.flags);
        end
      end
    end
  end

  // mechanism counters
  int m_busy = 0, m_reframe = 0, m_pass = 0;
  always @(posedge clk) if (rst_n) begin
    m_busy    += int'(l1_busy && !rf_en);
    m_reframe += int'(dut.reframe_pulse);
    m_pass    += int'(selftest_pass);
  end

  // ---------------------------------------------------------------- helpers
  task automatic send(int nobj, int olen, logic [7:0] bx, logic [7:0] status, bit cmp_b,
                      logic [4:0] flags, bit cmp_f, logic [7:0] exp_bx);
    exp_t e;
    make_event(e, nobj, olen, bx);
    e.bytes[$] = status;
    e.status = status; e.cmp_bytes = cmp_b; e.flags = flags; e.cmp_flags = cmp_f;
    e.bunch = exp_bx;
    expq.push_back(e);
  endtask
  task automatic send_ok(int nobj, int olen);
    logic [7:0] bx;
    bx = 8'($urandom);
    send(nobj, olen, bx, 8'(TYPE_SLIC), 1, '0, 1, bx);
  endtask
  task automatic drain();
    int t;
    t = 0;
    while ((srcq.size() != 0 || expq.size() != 0 || dut.u_framer.state != 0) && t < 400000) begin
      @(negedge clk); t++;
    end
    repeat (20) @(negedge clk);
    check("drained", expq.size(), 0);
  endtask
  task automatic wreg(logic [4:0] a, logic [15:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1'b1;
    @(negedge clk); reg_wr = 1'b0;
  endtask
  task automatic rreg(string what, logic [4:0] a, int exp);
    @(negedge clk); reg_addr = a; #1;
    check(what, int'(reg_rdata), exp);
  endtask

  // ---------------------------------------------------------------- scenarios
  int n_events_ok = 0;
  initial begin
    logic [7:0] bx;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check("power-up reframing done", int'(rf_en), 0);

    // clean events
    for (int k = 0; k < 6; k++) send_ok(1 + k % 4, 1 + k % 3);
    drain();

    // a violation replaces one data character
    viol_data_at = 20;
    send(2, 3, 8'h31, 8'h85, 1, '0, 1, 8'h31);
    drain();

    // lost End: the next Begin closes the event, marked "missed End"
    drop_end = 1;
    send(1, 2, 8'h41, 8'h89, 1, '0, 1, 8'h41);
    send_ok(1, 2);
    drain();

    // lost Begin: the event is thrown away and counted
    drop_begin = 1;
    begin exp_t e; make_event(e, 1, 1, 8'h51); end
    send_ok(2, 2);
    drain();

    // one stray special character between events: counted, nothing written
    stray_special = 1;
    repeat (10) @(negedge clk);
    send_ok(1, 1);
    drain();

    // burst of bad characters between events: reframe, recover on Pads
    burst_idle = 4;
    repeat (10) @(negedge clk);
    send_ok(1, 1);
    drain();

    // burst inside an event: error characters, then reframing until the Pads
    burst_at = 10; burst_len = 6;
    send(3, 2, 8'h61, 8'h95, 0, '0, 0, 8'h61);
    send_ok(1, 2);
    drain();

    // loss of PLL lock between events, then a front-panel request
    @(negedge clk); rx_lock = 1'b0;
    repeat (20) @(negedge clk);
    check("reframing while unlocked", int'(rf_en), 1);
    rx_lock = 1'b1;
    repeat (5) @(negedge clk);
    check("relocked on pads", int'(rf_en), 0);
    @(negedge clk); fp_reframe = 1'b1; @(negedge clk); fp_reframe = 1'b0;
    repeat (5) @(negedge clk);
    send_ok(1, 1);
    drain();

    // wrong bunch #: event synchronisation error, cleared by SCL_INITIALIZE
    bx = 8'h70;
    send(1, 1, bx, 8'(TYPE_SLIC), 1, 5'b10000, 1, bx + 8'd1);
    drain();
    check("sync error set", int'(sync_error), 1);
    @(negedge clk); scl_init = 1'b1; @(negedge clk); scl_init = 1'b0;
    check("sync error cleared", int'(sync_error), 0);
    repeat (10) @(negedge clk);
    send_ok(1, 1);
    drain();

    // full FIFO: L1 Busy, overflow, SCL_INITIALIZE clears the buffers
    ev_out_ready = 1'b0;
    for (int k = 0; k < 11; k++) begin exp_t e; make_event(e, 6, 4, 8'(k)); end
    while (srcq.size() != 0 || dut.u_framer.state != 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check("busy when full", int'(l1_busy), 1);
    rreg("fifo full flag", 5'd1, int'(dut.status_word));
    check("fifo full", int'(dut.fifo_full), 1);
    @(negedge clk); scl_init = 1'b1; @(negedge clk); scl_init = 1'b0;
    check("fifo empty after SCL init", int'(dut.fifo_empty), 1);
    ev_out_ready = 1'b1;
    repeat (10) @(negedge clk);
    check("busy released", int'(l1_busy), 0);
    send_ok(2, 2);
    drain();

    // transmit hold
    wreg(5'd0, 16'h0010);
    begin
      exp_t e;
      make_event(e, 1, 1, 8'h80);
      e.bunch = 8'h80;
      expq.push_back(e);
    end
    repeat (50) @(negedge clk);
    check("hold: nothing sent", int'(dut.u_framer.state), 0);
    wreg(5'd0, 16'h0000);
    drain();

    // self-test: three passes through the sequence, no errors
    wreg(5'd0, 16'h0001);
    repeat (3 * (256 + NUM_SPECIAL) + 10) @(negedge clk);
    wreg(5'd0, 16'h0000);
    check("self-test passes", m_pass >= 2 ? 1 : 0, 1);
    rreg("self-test errors", 5'd2, 0);
    repeat (10) @(negedge clk);
    send_ok(1, 1);
    drain();

    // the largest event the header can describe: 255 objects of 255 words
    send_ok(255, 255);
    drain();

    // counters against the damage injected
    // Begins seen in IDLE: every event sent except the one whose Begin was
    // lost and the one whose Begin followed a lost End
    rreg("begin count", 5'd16, n_sent - 2);
    rreg("missed End count", 5'd18, 1);
    rreg("missed Begin count", 5'd19, 1);
    // the lost-Begin event is 32 bytes; the self-test symbol still on the
    // link when self-test stops may add one more
    @(negedge clk); reg_addr = 5'd20; #1;
    check("idle data count", int'(reg_rdata inside {[32:33]}), 1);
    rreg("idle other special count", 5'd22, 1);
    rreg("event error count", 5'd23, 1 + 4);
    check("overflow counted", int'(dut.u_regs.cnt[8] > 0), 1);
    // power-up, 2 bursts, lock loss, front panel, 2 SCL_INITIALIZE
    rreg("reframe count", 5'd25, 7);
    rreg("sync error count", 5'd26, 1);
    rreg("parity error count", 5'd27, 0);

    // every mechanism happened: print how often, fail any that never did
    begin
      automatic string names[10] = '{"events begun", "events ended", "missed End", "missed Begin",
                           "data while idle", "violations while idle", "other special while idle",
                           "error characters in events", "FIFO overflow", "reframings"};
      for (int i = 0; i < 10; i++) begin
        $display("mechanism %-28s %0d", names[i], dut.u_regs.cnt[i]);
        check({"mechanism: ", names[i]}, int'(dut.u_regs.cnt[i] > 0), 1);
      end
      $display("mechanism %-28s %0d", "event synchronisation error", dut.u_regs.cnt[10]);
      $display("mechanism %-28s %0d", "L1 Busy cycles (not reframing)", m_busy);
      $display("mechanism %-28s %0d", "self-test passes", m_pass);
      check("mechanism: sync error", int'(dut.u_regs.cnt[10] > 0), 1);
    end
    check("mechanism: L1 busy", m_busy > 0 ? 1 : 0, 1);
    check("mechanism: reframing", m_reframe >= 5 ? 1 : 0, 1);
    check("mechanism: self-test", m_pass > 0 ? 1 : 0, 1);
    check("events out", n_out, 6 + 1 + 2 + 1 + 1 + 1 + 2 + 1 + 1 + 1 + 1 + 1 + 1 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
