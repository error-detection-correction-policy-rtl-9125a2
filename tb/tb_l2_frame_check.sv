// tb_l2_frame_check: self-checking test of the L2 header/trailer checker.
// Builds well-formed L2 events (header, objects, logical trailer, zero
// padding, 2-byte physical trailer) with random contents, then damages them
// in known ways (bunch # in the header or trailer, data type, a parity byte,
// a truncated event, a wrong expected bunch #) and compares the result flags
// with the ones each damage must give.
module tb_l2_frame_check;
  import l2_link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, fire = 1'b0;
  byte_beat_t beat = '0;
  logic [7:0] exp_bunch = '0;
  logic done, no_trailer, bunch_mismatch, dtype_mismatch, parity_err, sync_err;
  logic [7:0] bunch, phys_status;
  int checks = 0, failures = 0;

  l2_frame_check dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask

  // event bytes; returns the index of the logical trailer
  function automatic int build(output logic [7:0] ev[$], input int nobj, input int olen,
                               input logic [7:0] bx, input logic [7:0] dt);
    logic [7:0] le, lo;
    int tpos;
    ev.delete();
    ev.push_back(8'(nobj)); ev.push_back(8'd3); ev.push_back(8'(olen));
    ev.push_back(8'h21); ev.push_back(dt); ev.push_back(bx);
    ev.push_back(8'h34); ev.push_back(8'h12); ev.push_back(8'd7); ev.push_back(8'd1);
    ev.push_back(8'h00); ev.push_back(8'h00);
    for (int i = 0; i < nobj * olen * 4; i++) ev.push_back(8'($urandom));
    tpos = ev.size();
    le = '0; lo = '0;
    foreach (ev[i]) if (i % 2 == 0) le ^= ev[i]; else lo ^= ev[i];
    ev.push_back(bx); ev.push_back(dt); ev.push_back(le); ev.push_back(lo);
    while (ev.size() % 16 != 0) ev.push_back(8'h00);
    ev.push_back(8'h5C);            // physical trailer: parity byte (any value)
    ev.push_back(8'h81);            // physical trailer: status
    return tpos;
  endfunction

  task automatic play(logic [7:0] ev[$], logic [7:0] expb);
    exp_bunch = expb;
    foreach (ev[i]) begin
      @(negedge clk);
      fire = ($urandom % 3) != 0;
      while (!fire) begin
        @(negedge clk); fire = ($urandom % 3) != 0;
      end
      beat = '{data: ev[i], last: i == ev.size() - 1};
    end
    @(negedge clk); fire = 1'b0;
    @(negedge clk);
  endtask

  task automatic expect_flags(string name, bit nt, bit bm, bit dm, bit pe, bit se, int bx);
    check({name, " no_trailer"}, int'(no_trailer), int'(nt));
    check({name, " bunch_mismatch"}, int'(bunch_mismatch), int'(bm));
    check({name, " dtype_mismatch"}, int'(dtype_mismatch), int'(dm));
    check({name, " parity_err"}, int'(parity_err), int'(pe));
    check({name, " sync_err"}, int'(sync_err), int'(se));
    if (bx >= 0) check({name, " bunch"}, int'(bunch), bx);
  endtask

  int ndone = 0;
  always @(posedge clk) ndone += int'(done);

  initial begin
    logic [7:0] ev[$];
    int tp, nd;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) begin
      logic [7:0] bx;
      bx = 8'($urandom);
      tp = build(ev, 1 + k % 4, 1 + k % 3, bx, 8'h42);
      play(ev, bx);
      expect_flags("good", 0, 0, 0, 0, 0, bx);
      check("phys status", int'(phys_status), 'h81);
    end
    tp = build(ev, 2, 2, 8'h10, 8'h42); ev[5] = 8'h11;          // header bunch hit
    play(ev, 8'h10); expect_flags("hdr bunch", 0, 1, 0, 1, 0, 'h10);
    tp = build(ev, 2, 2, 8'h10, 8'h42); ev[tp] = 8'h14;         // trailer bunch hit
    play(ev, 8'h10); expect_flags("trl bunch", 0, 1, 0, 0, 0, 'h10);
    tp = build(ev, 3, 1, 8'h20, 8'h42);                         // other event's data
    play(ev, 8'h21); expect_flags("sync", 0, 0, 0, 0, 1, -1);
    tp = build(ev, 1, 2, 8'h30, 8'h42); ev[tp + 1] = 8'h43;     // data type hit
    play(ev, 8'h30); expect_flags("dtype", 0, 0, 1, 0, 0, 'h30);
    tp = build(ev, 1, 2, 8'h30, 8'h42); ev[tp + 3] ^= 8'h08;    // odd parity hit
    play(ev, 8'h30); expect_flags("parity", 0, 0, 0, 1, 0, 'h30);
    tp = build(ev, 4, 2, 8'h40, 8'h42);                         // truncated
    while (ev.size() > tp) void'(ev.pop_back());
    play(ev, 8'h40); expect_flags("truncated", 1, 0, 0, 0, 0, 'h40);
    tp = build(ev, 0, 2, 8'h50, 8'h42);                         // no objects
    play(ev, 8'h50); expect_flags("empty", 0, 0, 0, 0, 0, 'h50);
    check("done pulses", ndone, 15);
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
