// status_regs: error counters and control bits behind a register port.
//
// Errors are counted as they are detected and read back by the crate
// controller for monitoring and diagnosis. NCNT saturating 16-bit counters
// each add one when their `cnt_inc` bit is high; they are cleared only by the
// counter-clear control bit, not by SCL_INITIALIZE, so the evidence of what
// went wrong survives a re-initialisation.
//
// Register map (16-bit words, `reg_addr` in words):
//   0      control, read/write: b0 self-test enable, b4 transmit hold;
//          write-one pulses: b1 reframe request, b2 LED clear, b3 counter clear
//   1      status, read only: `status_in`
//   2      self-test error count, read only: `selftest_cnt`
//   3      receive FIFO fill level, read only: `fifo_level`
//   16+i   counter i
// A write takes effect at the clock edge; reads are combinational.
// Counting errors for readback follows the design notes; the map, widths and
// clear rules are this design's choice.
module status_regs #(
  parameter int unsigned NCNT = 14   // at most 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       reg_addr,
  input  logic             reg_wr,
  input  logic [15:0]      reg_wdata,
  output logic [15:0]      reg_rdata,
  input  logic [NCNT-1:0]  cnt_inc,
  input  logic [15:0]      status_in,
  input  logic [15:0]      selftest_cnt,
  input  logic [15:0]      fifo_level,
  output logic             selftest_en,
  output logic             tx_hold,
  output logic             reframe_req,  // one-cycle pulses
  output logic             led_clr,
  output logic             cnt_clr
);

  logic [15:0] cnt [NCNT];
  logic        ctrl_wr;

  assign ctrl_wr     = reg_wr && reg_addr == 5'd0;
  assign reframe_req = ctrl_wr && reg_wdata[1];
  assign led_clr     = ctrl_wr && reg_wdata[2];
  assign cnt_clr     = ctrl_wr && reg_wdata[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      selftest_en <= 1'b0;
      tx_hold     <= 1'b0;
    end else if (ctrl_wr) begin
      selftest_en <= reg_wdata[0];
      tx_hold     <= reg_wdata[4];
    end
  end

  for (genvar i = 0; i < NCNT; i++) begin : g_cnt
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                          cnt[i] <= '0;
      else if (cnt_clr)                    cnt[i] <= '0;
      else if (cnt_inc[i] && cnt[i] != '1) cnt[i] <= cnt[i] + 1'b1;
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_addr == 5'd0)      reg_rdata = {11'd0, tx_hold, 3'd0, selftest_en};
    else if (reg_addr == 5'd1) reg_rdata = status_in;
    else if (reg_addr == 5'd2) reg_rdata = selftest_cnt;
    else if (reg_addr == 5'd3) reg_rdata = fifo_level;
    else if (reg_addr[4] && 32'(reg_addr[3:0]) < NCNT)
      reg_rdata = cnt[reg_addr[3:0]];
  end

endmodule
