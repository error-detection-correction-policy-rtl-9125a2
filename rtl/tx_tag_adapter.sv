// tx_tag_adapter: presents a byte stream as a tagged-byte FIFO read port.
//
// On the transmit path of an output board (MBT Out) the physical trailer is
// appended to data coming from the processor rather than from a link. This
// adapter lets phys_trailer_gen read that stream as if it were the receive
// FIFO: every byte appears as a DATA entry, and after the byte marked `last`
// one END entry (no flags) follows. No storage beyond one flag bit.
//
// Timing: combinational pass-through; `in_ready` follows `rd` while bytes
// are passed, and the END entry costs no input cycle.
module tx_tag_adapter
  import l2_link_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  byte_beat_t  in_beat,
  output logic        in_ready,
  output logic        empty,
  output fifo_entry_t rdata,
  input  logic        rd
);

  logic end_pending;

  assign empty    = !(in_valid || end_pending);
  assign rdata    = end_pending ? '{tag: TAG_END, data: 8'h00}
                                : '{tag: TAG_DATA, data: in_beat.data};
  assign in_ready = rd && !end_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                end_pending <= 1'b0;
    else if (end_pending && rd)                end_pending <= 1'b0;
    else if (in_valid && in_ready && in_beat.last) end_pending <= 1'b1;
  end

endmodule
