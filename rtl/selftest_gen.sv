// selftest_gen: link self-test transmitter.
//
// While `enable` is high it sends, one per clock, the sequence of all link
// symbols: data bytes 0x00..0xFF, then special characters 0..NUM_SPECIAL-1,
// and starts over. `wrap` pulses with the last symbol of each pass (a test
// point that shows one pulse per pass). Start and stop come from a register
// bit, not from a special character, since every special character is part
// of the sequence. Sending every symbol in order, and the start/stop rule,
// follow the design notes; the order of the sequence is this design's.
// `enable` low resets the sequence to its first symbol.
module selftest_gen
  import l2_link_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  output link_sym_t tx_sym,
  output logic      wrap
);

  localparam int unsigned SEQ_LEN = 256 + NUM_SPECIAL;
  logic [8:0] seq;

  always_comb begin
    tx_sym.valid = enable;
    tx_sym.kind  = seq[8] ? SYM_SPECIAL : SYM_DATA;
    tx_sym.code  = seq[7:0];
    wrap         = enable && (seq == 9'(SEQ_LEN - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       seq <= '0;
    else if (!enable) seq <= '0;
    else              seq <= wrap ? 9'd0 : seq + 1'b1;
  end

endmodule
