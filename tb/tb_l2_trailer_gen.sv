// tb_l2_trailer_gen: self-checking test of the sender-side L2 formatter.
// Random-length events with random header bytes go in through a throttled
// valid/ready stream; the output must be the input bytes, the 4-byte trailer
// (header B5, header B4, XOR of even bytes, XOR of odd bytes) and zero
// padding to a multiple of 16 bytes with `last` on the final byte. Also
// checks that the output takes exactly the padded length in cycles when
// never throttled.
module tb_l2_trailer_gen;
  import l2_link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  byte_beat_t in_beat = '0, out_beat;
  int checks = 0, failures = 0;
  byte_beat_t expq[$];
  bit throttle = 1'b1;
  int out_bytes = 0;

  l2_trailer_gen dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) out_ready = throttle ? (($urandom % 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    byte_beat_t e;
    out_bytes++;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected output byte");
    end else begin
      e = expq.pop_front();
      if (e !== out_beat) begin
        failures++;
        $display("FAIL got %h/%b expected %h/%b", out_beat.data, out_beat.last, e.data, e.last);
      end
    end
  end

  task automatic send_event(int n);
    logic [7:0] b[];
    logic [7:0] le, lo;
    int total;
    b = new[n];
    le = '0; lo = '0;
    foreach (b[i]) begin
      b[i] = 8'($urandom);
      if (i % 2 == 0) le ^= b[i]; else lo ^= b[i];
      expq.push_back('{data: b[i], last: 1'b0});
    end
    expq.push_back('{data: b[5], last: 1'b0});
    expq.push_back('{data: b[4], last: 1'b0});
    expq.push_back('{data: le, last: 1'b0});
    expq.push_back('{data: lo, last: 1'b0});
    total = ((n + 4 + 15) / 16) * 16;
    for (int i = n + 4; i < total; i++) expq.push_back('{data: 8'h00, last: 1'b0});
    expq[$].last = 1'b1;
    foreach (b[i]) begin
      if (throttle && ($urandom % 4) == 0) begin
        @(negedge clk); in_valid = 1'b0;    // random gap in the input
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_beat  = '{data: b[i], last: i == n - 1};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    longint t0;
    int nb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    send_event(12);        // header only, 12 + 4 = 16: no padding
    send_event(28);        // 28 + 4 = 32: no padding
    for (int k = 0; k < 30; k++) send_event(6 + int'($urandom % 60));
    wait (expq.size() == 0);
    // timing: unthrottled, a 20-byte event leaves in 32 cycles
    throttle = 1'b0;
    repeat (3) @(negedge clk);
    nb = out_bytes;
    fork
      send_event(20);
      begin
        @(posedge clk iff (out_valid && out_ready));
        t0 = $time;
        @(posedge clk iff (out_valid && out_ready && out_beat.last));
        checks++;
        if (($time - t0) / 10 != 31) begin
          failures++; $display("FAIL event took %0d cycles", ($time - t0) / 10 + 1);
        end
      end
    join
    wait (expq.size() == 0);
    checks++;
    if (out_bytes - nb != 32) begin failures++; $display("FAIL byte count"); end
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
