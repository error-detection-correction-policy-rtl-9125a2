// selftest_chk: link self-test receiver.
//
// While `enable` is high it checks that received symbols follow the self-test
// sequence (data 0x00..0xFF, then special characters 0..NUM_SPECIAL-1, in a
// loop). Checking starts at the first data byte 0x00 received, so symbols
// still on the link from before the test do not count. Each symbol
// that differs from the expected one, including a violation, is one error.
// After a single bad symbol the checker keeps its own count (a corrupted
// character costs one error); after two bad symbols in a row it follows the
// received sequence again (a slipped or lost character costs two).
// `pass` pulses when the last symbol of the sequence arrives in order, and
// `err_cnt` is a saturating error counter for register readback, cleared by
// `cnt_clr`. Verifying the order and the counter follow the design notes; the
// resynchronisation rule is this design's choice.
//
// Timing: `err` and `pass` are registered, one cycle after the symbol.
module selftest_chk
  import l2_link_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        cnt_clr,
  input  link_sym_t   rx_sym,
  output logic        err,
  output logic        pass,
  output logic [15:0] err_cnt
);

  localparam int unsigned SEQ_LEN = 256 + NUM_SPECIAL;
  logic       synced;
  logic [8:0] expect_q, rx_pos, next_pos;
  logic       rx_ok_kind;

  always_comb begin
    rx_ok_kind = rx_sym.kind == SYM_DATA ||
                 (rx_sym.kind == SYM_SPECIAL && rx_sym.code < 8'(NUM_SPECIAL));
    rx_pos     = {rx_sym.kind == SYM_SPECIAL, rx_sym.code};
    next_pos   = (rx_pos == 9'(SEQ_LEN - 1)) ? 9'd0 : rx_pos + 1'b1;
  end

  logic [8:0] expect_inc;
  logic       miss;               // the previous symbol was an error
  logic       mismatch;
  assign expect_inc = (expect_q == 9'(SEQ_LEN - 1)) ? 9'd0 : expect_q + 1'b1;
  assign mismatch   = !rx_ok_kind || rx_pos != expect_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synced <= 1'b0; miss <= 1'b0; expect_q <= '0;
      err <= 1'b0; pass <= 1'b0; err_cnt <= '0;
    end else begin
      err  <= 1'b0;
      pass <= 1'b0;
      if (cnt_clr) err_cnt <= '0;
      if (!enable) begin
        synced <= 1'b0;
        miss   <= 1'b0;
      end else if (rx_sym.valid) begin
        if (!synced) begin
          // wait for the start of the sequence, data byte 0x00
          synced   <= rx_ok_kind && rx_pos == 9'd0;
          expect_q <= 9'd1;
        end else if (mismatch) begin
          err  <= 1'b1;
          miss <= 1'b1;
          if (!cnt_clr && err_cnt != '1) err_cnt <= err_cnt + 1'b1;
          // one bad symbol: assume it was corrupted and keep counting on;
          // two in a row: assume a slip and follow what is received
          expect_q <= (miss && rx_ok_kind) ? next_pos : expect_inc;
        end else begin
          miss     <= 1'b0;
          expect_q <= expect_inc;
          if (rx_pos == 9'(SEQ_LEN - 1)) pass <= 1'b1;
        end
      end
    end
  end

endmodule
