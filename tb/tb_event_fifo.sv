// tb_event_fifo: self-checking test of the receive FIFO.
// Random writes and reads against a queue model, with checks of the output
// word, empty/full/almost-full/high-water flags and the count, then a flush.
module tb_event_fifo;
  localparam int unsigned WIDTH = 10, DEPTH = 16, HWM = 12;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic empty, full, almost_full, hwm;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  event_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .HWM(HWM)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int a, int b);
    checks++;
    if (a !== b) begin failures++; $display("FAIL %s: got %0d expected %0d", what, a, b); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // bias towards filling in the first half, draining in the second
      wr_en   = ($urandom % 100) < ((i % 400) < 200 ? 70 : 30);
      rd_en   = ($urandom % 100) < ((i % 400) < 200 ? 30 : 70);
      wr_data = WIDTH'($urandom);
      check("count", int'(count), model.size());
      check("empty", int'(empty), int'(model.size() == 0));
      check("full", int'(full), int'(model.size() == DEPTH));
      check("almost_full", int'(almost_full), int'(model.size() >= DEPTH - 1));
      check("hwm", int'(hwm), int'(model.size() >= HWM));
      if (model.size() != 0) check("head", int'(rd_data), int'(model[0]));
      @(posedge clk);
      begin
        bit do_wr, do_rd;
        do_wr = wr_en && model.size() < DEPTH;
        do_rd = rd_en && model.size() != 0;
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    @(negedge clk); wr_en = 1'b0; rd_en = 1'b0;
    repeat (DEPTH) begin
      @(negedge clk); wr_en = 1'b1; wr_data = WIDTH'($urandom);
    end
    @(negedge clk); wr_en = 1'b0;
    check("filled", int'(full), 1);
    flush = 1'b1; @(negedge clk); flush = 1'b0;
    check("flushed empty", int'(empty), 1);
    check("flushed count", int'(count), 0);
    wr_en = 1'b1; wr_data = 10'h2A5; @(negedge clk); wr_en = 1'b0;
    check("after flush", int'(rd_data), 'h2A5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
