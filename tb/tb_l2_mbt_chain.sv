// tb_l2_mbt_chain: two link ends in a chain, SLIC-type into MBT-input type.
//
// Board A (SLIC, 2-byte physical trailer) sends L2 events to itself over a
// loop-back link and delivers them with its physical trailer. Those bytes
// are framed again by a tx_framer and sent to board B, configured as an MBT
// input (TYPE_ID = MBT, MBT_INPUT = 1). Board B must deliver each event with
// A's two trailer bytes followed by 14 more: B2..B13 zero, B14 its own XOR of
// everything it received, B15 its own status (type MBT). One event is hit by a
// violation on A's link and another on B's link, so each board's status
// byte reports only the errors seen on its own link. Every event leaves B
// aligned to 16 bytes again. Finally B is fed from board C, an output board
// (TX_PHYS_TRAILER = 1, type MBT) that appends its 2-byte physical trailer
// on the transmit side.
module tb_l2_mbt_chain;
  import l2_link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask

  // ---------------- board A
  logic a_ev_in_valid, a_ev_in_ready, a_out_valid, a_out_ready;
  byte_beat_t a_ev_in_beat, a_out_beat;
  link_sym_t a_tx, a_rx;
  logic [15:0] a_rdata, b_rdata;
  logic [4:0] a_flags, b_flags;
  logic [7:0] a_bx, b_bx, a_ps, b_ps;
  logic a_done, b_done;
  logic [7:0] exp_bunch;

  byte_beat_t srcq[$];
  assign a_ev_in_valid = srcq.size() != 0;
  assign a_ev_in_beat  = (srcq.size() != 0) ? srcq[0] : '0;
  always @(posedge clk) if (a_ev_in_valid && a_ev_in_ready) void'(srcq.pop_front());

  l2_link_top u_a (
    .clk, .rst_n, .scl_init(1'b0), .scl_bunch(exp_bunch), .l1_busy(), .sync_error(),
    .ev_in_valid(a_ev_in_valid), .ev_in_beat(a_ev_in_beat), .ev_in_ready(a_ev_in_ready),
    .tx_sym(a_tx), .rx_sym(a_rx), .rf_en(), .rx_lock(1'b1),
    .ev_out_valid(a_out_valid), .ev_out_beat(a_out_beat), .ev_out_ready(a_out_ready),
    .chk_done(a_done), .chk_flags(a_flags), .chk_bunch(a_bx), .chk_phys_status(a_ps),
    .fp_reframe(1'b0), .led(), .selftest_pass(), .selftest_err(), .selftest_wrap(),
    .reg_addr(5'd0), .reg_wr(1'b0), .reg_wdata(16'd0), .reg_rdata(a_rdata));

  // ---------------- A's output framed onto the link to B
  link_sym_t ab_tx, b_rx;
  tx_framer u_fr (
    .clk, .rst_n, .hold(1'b0),
    .in_valid(a_out_valid), .in_beat(a_out_beat), .in_ready(a_out_ready), .tx_sym(ab_tx));

  // ---------------- board C: an output board (MBT Out) that appends its own
  // 2-byte physical trailer on the transmit side
  byte_beat_t srcq_c[$];
  logic c_in_valid, c_in_ready, c_out_valid;
  byte_beat_t c_in_beat, c_out_beat;
  link_sym_t c_tx;
  logic [15:0] c_rdata;
  assign c_in_valid = srcq_c.size() != 0;
  assign c_in_beat  = (srcq_c.size() != 0) ? srcq_c[0] : '0;
  always @(posedge clk) if (c_in_valid && c_in_ready) void'(srcq_c.pop_front());
  l2_link_top #(.TYPE_ID(TYPE_MBT), .TX_PHYS_TRAILER(1'b1)) u_c (
    .clk, .rst_n, .scl_init(1'b0), .scl_bunch(8'h00), .l1_busy(), .sync_error(),
    .ev_in_valid(c_in_valid), .ev_in_beat(c_in_beat), .ev_in_ready(c_in_ready),
    .tx_sym(c_tx), .rx_sym('0), .rf_en(), .rx_lock(1'b1),
    .ev_out_valid(c_out_valid), .ev_out_beat(c_out_beat), .ev_out_ready(1'b1),
    .chk_done(), .chk_flags(), .chk_bunch(), .chk_phys_status(),
    .fp_reframe(1'b0), .led(), .selftest_pass(), .selftest_err(), .selftest_wrap(),
    .reg_addr(5'd0), .reg_wr(1'b0), .reg_wdata(16'd0), .reg_rdata(c_rdata));
  bit use_c = 1'b0;

  // ---------------- board B (MBT input)
  logic b_out_valid, b_out_ready = 1'b1, b_in_ready;
  byte_beat_t b_out_beat;
  link_sym_t b_tx;
  l2_link_top #(.TYPE_ID(TYPE_MBT), .MBT_INPUT(1'b1)) u_b (
    .clk, .rst_n, .scl_init(1'b0), .scl_bunch(exp_bunch), .l1_busy(), .sync_error(),
    .ev_in_valid(1'b0), .ev_in_beat('0), .ev_in_ready(b_in_ready),
    .tx_sym(b_tx), .rx_sym(b_rx), .rf_en(), .rx_lock(1'b1),
    .ev_out_valid(b_out_valid), .ev_out_beat(b_out_beat), .ev_out_ready(b_out_ready),
    .chk_done(b_done), .chk_flags(b_flags), .chk_bunch(b_bx), .chk_phys_status(b_ps),
    .fp_reframe(1'b0), .led(), .selftest_pass(), .selftest_err(), .selftest_wrap(),
    .reg_addr(5'd0), .reg_wr(1'b0), .reg_wdata(16'd0), .reg_rdata(b_rdata));

  // ---------------- links with optional damage on one data character
  int viol_a = -1, viol_b = -1, ia = 0, ib = 0;
  always @(posedge clk) begin
    link_sym_t s;
    s = a_tx;
    if (s.kind == SYM_SPECIAL && s.code == SC_BEGIN) ia = 0;
    if (s.kind == SYM_DATA) begin
      if (ia == viol_a) begin s.kind = SYM_VIOL; viol_a = -1; end
      ia++;
    end
    a_rx <= s;
    s = use_c ? c_tx : ab_tx;
    if (s.kind == SYM_SPECIAL && s.code == SC_BEGIN) ib = 0;
    if (s.kind == SYM_DATA) begin
      if (ib == viol_b) begin s.kind = SYM_VIOL; viol_b = -1; end
      ib++;
    end
    b_rx <= s;
  end

  // ---------------- expected output of B
  typedef struct { logic [7:0] bytes[$]; } ev_t;
  ev_t expq[$];
  logic [7:0] bunches[$];
  assign exp_bunch = (bunches.size() != 0) ? bunches[0] : 8'h00;

  task automatic send(int nobj, int olen, logic [7:0] a_status, logic [7:0] b_err,
                      bit via_c = 1'b0);
    logic [7:0] b[$];
    logic [7:0] le, lo, lp;
    ev_t e;
    logic [7:0] bx;
    bx = 8'($urandom);
    b = '{8'(nobj), 8'd3, 8'(olen), 8'h21, 8'h42, bx, 8'h00, 8'h00, 8'd7, 8'd1, 8'h00, 8'h00};
    for (int i = 0; i < nobj * olen * 4; i++) b.push_back(8'($urandom));
    foreach (b[i])
      if (via_c) srcq_c.push_back('{data: b[i], last: i == b.size() - 1});
      else       srcq.push_back('{data: b[i], last: i == b.size() - 1});
    le = '0; lo = '0;
    foreach (b[i]) if (i % 2 == 0) le ^= b[i]; else lo ^= b[i];
    b.push_back(bx); b.push_back(8'h42); b.push_back(le); b.push_back(lo);
    while (b.size() % 16 != 0) b.push_back(8'h00);
    lp = '0;
    foreach (b[i]) lp ^= b[i];
    b.push_back(lp);                       // A's physical trailer
    b.push_back(a_status);
    lp = '0;
    foreach (b[i]) lp ^= b[i];             // B's parity: everything it received
    for (int i = 2; i <= 13; i++) b.push_back(8'h00);
    b.push_back(lp);
    b.push_back(b_err | 8'(TYPE_MBT));
    e.bytes = b;
    expq.push_back(e);
    bunches.push_back(bx);
  endtask

  logic [7:0] cur[$];
  int n_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (b_out_valid && b_out_ready) begin
      cur.push_back(b_out_beat.data);
      if (b_out_beat.last) begin
        ev_t e;
        n_out++;
        e = expq.pop_front();
        checks++;
        if (cur.size() != e.bytes.size()) begin
          failures++; $display("FAIL event %0d length %0d expected %0d", n_out, cur.size(), e.bytes.size());
        end else begin
          foreach (cur[i]) if (cur[i] !== e.bytes[i]) begin
            failures++; $display("FAIL event %0d byte %0d: %h expected %h", n_out, i, cur[i], e.bytes[i]);
            break;
          end
          checks++;
          if (cur.size() % 16 != 0) begin failures++; $display("FAIL 16-byte alignment"); end
        end
        cur.delete();
      end
    end
    if (b_done) begin
      checks++;
      if (b_flags !== 5'b0) begin failures++; $display("FAIL B check flags %b", b_flags); end
      void'(bunches.pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    send(1, 1, 8'(TYPE_SLIC), 8'h00);
    send(2, 3, 8'(TYPE_SLIC), 8'h00);
    wait (expq.size() == 0);
    viol_a = 7;                                   // A reports it, B does not
    send(3, 1, 8'h85, 8'h00);
    wait (expq.size() == 0);
    viol_b = 9;                                   // B reports it
    send(2, 2, 8'(TYPE_SLIC), 8'h84 );
    send(4, 2, 8'(TYPE_SLIC), 8'h00);
    wait (expq.size() == 0);
    // output board C feeds B: C's transmit-side trailer, then B's 14 bytes
    repeat (20) @(negedge clk);
    use_c = 1'b1;
    repeat (20) @(negedge clk);
    send(1, 2, 8'(TYPE_MBT), 8'h00, 1'b1);
    send(3, 3, 8'(TYPE_MBT), 8'h00, 1'b1);
    wait (expq.size() == 0);
    repeat (20) @(negedge clk);
    check("events through the chain", n_out, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
