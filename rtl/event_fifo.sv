// event_fifo: synchronous first-in first-out buffer for the receive path.
//
// Holds DEPTH entries of WIDTH bits (tagged bytes in this design). A write
// when full is ignored; a read when empty is ignored. `flush` empties the FIFO
// at once (SCL_INITIALIZE clears all buffers). `almost_full` is high with one
// free place left, so the writer can keep that place for an end-of-event mark;
// `hwm` is high at or above HWM entries and drives the L1 Busy request.
//
// Timing: first-word-fall-through; rd_data shows the oldest entry whenever
// `empty` is low, and a read pops it at the clock edge. Storage is a plain
// array that synthesises to a memory. The buffer itself follows the design
// notes; its depth and high-water mark are this design's choice.
module event_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned HWM   = 768
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             almost_full,
  output logic             hwm,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign empty       = (count == '0);
  assign full        = (count == CW'(DEPTH));
  assign almost_full = (count >= CW'(DEPTH - 1));
  assign hwm         = (count >= CW'(HWM));
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

endmodule
