// phys_trailer_gen: FIFO readout with physical-trailer insertion.
//
// Pops the receive FIFO and forwards each DATA or ERROR byte as an event byte,
// while it accumulates the 8-bit longitudinal parity (XOR) of all received
// bytes and the error status of the event. At the END mark it appends the
// physical trailer, whose last byte carries `last` (End of Event follows):
//
//   MBT_INPUT = 0 (FIC, SLIC, MBT output): 2 bytes
//       B0 longitudinal parity of the received bytes, B1 status
//   MBT_INPUT = 1 (MBT input): 14 bytes, which with the 2-byte trailer the
//       sender already put at the end of the data make a 16-byte trailer
//       B2..B13 zero (reserved / room for error locations),
//       B14 own longitudinal parity of everything received, B15 own status
//
// Status byte: b7 any receive error, b1..b0 board type ID (FIC 0, SLIC 1,
// MBT 2), as the link format defines; b2 error character, b3 missed End
// (boundary inserted), b4 reframing during the event, b5 bytes dropped are
// this design's assignment of the remaining bits. The status byte is not
// included in the parity.
//
// Timing: valid/ready stream; one byte per cycle when `out_ready` is high.
// An END mark costs no cycle of its own beyond the trailer bytes.
module phys_trailer_gen
  import l2_link_pkg::*;
#(
  parameter logic [1:0] TYPE_ID   = TYPE_SLIC,
  parameter bit         MBT_INPUT = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  // FIFO side (first-word-fall-through)
  input  logic        fifo_empty,
  input  fifo_entry_t fifo_rdata,
  output logic        fifo_rd,
  // output stream
  output logic        out_valid,
  output byte_beat_t  out_beat,
  input  logic        out_ready
);

  localparam int unsigned TLEN = MBT_INPUT ? 14 : 2;

  logic       in_trailer;
  logic [3:0] tidx;                 // index of the trailer byte being sent
  logic [7:0] lpar, lpar_t;         // running parity / parity held for trailer
  logic       err_char;
  logic [7:0] status_t;

  always_comb begin
    fifo_rd   = 1'b0;
    out_valid = 1'b0;
    out_beat  = '{data: fifo_rdata.data, last: 1'b0};
    if (in_trailer) begin
      out_valid = 1'b1;
      out_beat.last = (tidx == 4'(TLEN - 1));
      if (tidx == 4'(TLEN - 2))      out_beat.data = lpar_t;
      else if (tidx == 4'(TLEN - 1)) out_beat.data = status_t;
      else                           out_beat.data = 8'h00;
    end else if (!fifo_empty) begin
      if (fifo_rdata.tag == TAG_END) begin
        fifo_rd = 1'b1;             // absorbed into the trailer state
      end else begin
        out_valid = 1'b1;
        fifo_rd   = out_ready;
      end
    end
  end

  // status byte of the event that an END mark closes
  logic [7:0] status_nx;
  always_comb begin
    status_nx = '0;
    status_nx[1:0]         = TYPE_ID;
    status_nx[ST_ERRCHAR]  = err_char;
    status_nx[ST_FORCED]   = fifo_rdata.data[EF_FORCED];
    status_nx[ST_REFRAME]  = fifo_rdata.data[EF_REFRAME];
    status_nx[ST_OVERFLOW] = fifo_rdata.data[EF_OVERFLOW];
    status_nx[ST_ANY_ERR]  = err_char | (|fifo_rdata.data[2:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_trailer <= 1'b0;
      tidx       <= '0;
      lpar       <= '0;
      lpar_t     <= '0;
      err_char   <= 1'b0;
      status_t   <= '0;
    end else if (clear) begin
      in_trailer <= 1'b0;
      tidx       <= '0;
      lpar       <= '0;
      err_char   <= 1'b0;
    end else if (in_trailer) begin
      if (out_ready) begin
        tidx <= tidx + 1'b1;
        if (tidx == 4'(TLEN - 1)) begin
          in_trailer <= 1'b0;
          tidx       <= '0;
        end
      end
    end else if (fifo_rd) begin
      if (fifo_rdata.tag == TAG_END) begin
        status_t   <= status_nx;
        lpar_t     <= lpar;
        lpar       <= '0;
        err_char   <= 1'b0;
        in_trailer <= 1'b1;
        tidx       <= '0;
      end else begin
        lpar <= lpar ^ fifo_rdata.data;
        if (fifo_rdata.tag == TAG_ERROR) err_char <= 1'b1;
      end
    end
  end

endmodule
