// tb_tx_framer: self-checking test of the transmit framer.
// Sends events of random length through a valid/ready stream and checks the
// character sequence on the link: Pads while idle, Begin, the data bytes in
// order (Pads may fill input gaps), exactly PADS_BEFORE_END Pads, End. Checks that `hold` keeps a new
// event from starting, and that an event of n bytes occupies the link for
// n + 2 + PADS_BEFORE_END cycles.
module tb_tx_framer;
  import l2_link_pkg::*;

  localparam int unsigned NPAD = 2;
  logic clk = 1'b0, rst_n = 1'b0, hold = 1'b0, in_valid = 1'b0, in_ready;
  byte_beat_t in_beat = '0;
  link_sym_t tx_sym;
  int checks = 0, failures = 0;

  tx_framer #(.PADS_BEFORE_END(NPAD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask

  // link monitor: decode the character stream into events
  logic [7:0] rxq[$];
  int n_events = 0, state = 0, npads = 0, t_begin = 0, last_len = 0;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (!tx_sym.valid || tx_sym.kind == SYM_VIOL) begin
      failures++; $display("FAIL invalid character");
    end
    case (state)
      0: if (tx_sym.kind == SYM_SPECIAL && tx_sym.code == SC_BEGIN) begin
           state = 1; t_begin = $time / 10;
         end else if (!(tx_sym.kind == SYM_SPECIAL && tx_sym.code == SC_PAD)) begin
           failures++; $display("FAIL non-pad between events");
         end
      1: if (tx_sym.kind == SYM_DATA) begin
           npads = 0;                 // pads in input gaps are allowed
           rxq.push_back(tx_sym.code);
         end else if (tx_sym.code == SC_PAD) npads++;
         else if (tx_sym.code == SC_END) begin
           if (npads != NPAD) begin failures++; $display("FAIL %0d pads before End", npads); end
           last_len = $time / 10 - t_begin + 1;
           npads = 0; state = 0; n_events++;
         end else begin
           failures++; $display("FAIL unexpected special %0d", tx_sym.code);
         end
      default: ;
    endcase
  end

  task automatic send(int n, bit gaps);
    logic [7:0] exp[$];
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp.push_back(b);
      if (gaps && ($urandom % 3) == 0) begin @(negedge clk); in_valid = 1'b0; end
      @(negedge clk);
      in_valid = 1'b1; in_beat = '{data: b, last: i == n - 1};
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 1'b0;
    wait (state == 0);
    @(negedge clk);
    check("event length", rxq.size(), n);
    foreach (exp[i]) if (i < rxq.size()) check("byte", int'(rxq[i]), int'(exp[i]));
    rxq.delete();
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    send(1, 0);
    send(10, 0);
    check("link cycles of a 10-byte event", last_len, 10 + 2 + NPAD);
    for (int k = 0; k < 20; k++) send(1 + int'($urandom % 40), 1);
    // hold: a waiting event is not started
    hold = 1'b1;
    @(negedge clk); in_valid = 1'b1; in_beat = '{data: 8'h77, last: 1'b1};
    repeat (10) @(negedge clk);
    check("held: no begin", state, 0);
    check("held: not taken", int'(in_ready), 0);
    hold = 1'b0;
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 1'b0;
    wait (state == 0); @(negedge clk);
    check("released event", int'(rxq[0]), 'h77);
    check("events", n_events, 23);
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
