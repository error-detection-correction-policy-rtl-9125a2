// tb_phys_trailer_gen: self-checking test of the FIFO readout with
// physical-trailer insertion. Two instances, a 2-byte trailer (SLIC) and a
// 16-byte MBT-input trailer, read the same random events (DATA, ERROR and END
// entries with random end flags) from queue-modelled FIFOs while the output
// is throttled at random. Every output byte and `last` is compared with a
// reference built from the entries: XOR parity of the data, the status byte
// from the error flags and board type, and the zero fill of the MBT trailer.
module tb_phys_trailer_gen;
  import l2_link_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fifo_entry_t q [2][$];
  byte_beat_t  expq [2][$];
  logic        f_empty [2], f_rd [2], o_valid [2], o_ready [2];
  fifo_entry_t f_rdata [2];
  byte_beat_t  o_beat [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    assign f_empty[g] = (q[g].size() == 0);
    assign f_rdata[g] = (q[g].size() == 0) ? '0 : q[g][0];
    phys_trailer_gen #(.TYPE_ID(g ? TYPE_MBT : TYPE_SLIC), .MBT_INPUT(g == 1)) dut (
      .clk, .rst_n, .clear(1'b0),
      .fifo_empty(f_empty[g]), .fifo_rdata(f_rdata[g]), .fifo_rd(f_rd[g]),
      .out_valid(o_valid[g]), .out_beat(o_beat[g]), .out_ready(o_ready[g]));
    always @(posedge clk) if (rst_n) begin
      if (o_valid[g] && o_ready[g]) begin
        checks++;
        if (expq[g].size() == 0) begin
          failures++; $display("FAIL inst %0d: unexpected byte", g);
        end else begin
          byte_beat_t e;
          e = expq[g].pop_front();
          if (e !== o_beat[g]) begin
            failures++;
            $display("FAIL inst %0d: got %h/%b expected %h/%b", g,
                     o_beat[g].data, o_beat[g].last, e.data, e.last);
          end
        end
      end
      if (f_rd[g] && q[g].size() != 0) void'(q[g].pop_front());
    end
    always @(negedge clk) o_ready[g] = ($urandom % 4) != 0;
  end

  task automatic make_event(int n, int err_pct, logic [7:0] flags);
    logic [7:0] lp, st;
    bit err;
    lp = '0; err = 1'b0;
    for (int i = 0; i < n; i++) begin
      fifo_entry_t e;
      e.data = 8'($urandom);
      e.tag  = (int'($urandom % 100) < err_pct) ? TAG_ERROR : TAG_DATA;
      err   |= (e.tag == TAG_ERROR);
      lp    ^= e.data;
      for (int g = 0; g < 2; g++) begin
        q[g].push_back(e);
        expq[g].push_back('{data: e.data, last: 1'b0});
      end
    end
    for (int g = 0; g < 2; g++) q[g].push_back('{tag: TAG_END, data: flags});
    st = {err | (|flags[2:0]), 1'b0, flags[EF_OVERFLOW], flags[EF_REFRAME],
          flags[EF_FORCED], err, 2'b00};
    expq[0].push_back('{data: lp, last: 1'b0});
    expq[0].push_back('{data: st | 8'(TYPE_SLIC), last: 1'b1});
    for (int i = 2; i <= 13; i++) expq[1].push_back('{data: 8'h00, last: 1'b0});
    expq[1].push_back('{data: lp, last: 1'b0});
    expq[1].push_back('{data: st | 8'(TYPE_MBT), last: 1'b1});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    make_event(5, 0, 8'h00);     // clean event
    make_event(1, 0, 8'h00);     // one byte
    make_event(0, 0, 8'h01);     // empty event closed by a missed End
    for (int k = 0; k < 40; k++)
      make_event(1 + int'($urandom % 30), (k % 3 == 0) ? 10 : 0,
                 (k % 5 == 0) ? 8'($urandom % 8) : 8'h00);
    wait (expq[0].size() == 0 && expq[1].size() == 0);
    repeat (5) @(posedge clk);
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
