// l2_frame_check: receiver-side check of the L2 logical format of an event.
//
// Watches an event byte stream (header, objects, logical trailer, zero
// padding, physical trailer, `last` on the final byte). From the header it
// takes B0 (number of objects), B1 (header length in 4-byte words), B2 (object
// length in 4-byte words), B4 (data type #) and B5 (bunch #), and from them
// the position of the logical trailer, 4*B1 + 4*B0*B2. It then checks
//   - trailer T0 (bunch #) against header B5 and T1 (data type) against B4,
//   - T2 / T3 against the XOR of the even / odd bytes before the trailer,
//   - that the event is long enough to hold the trailer at all,
// and compares the bunch # with the one expected from the timing system: an
// event synchronisation error is flagged only when neither the header nor the
// trailer copy matches (one copy hit by a one-bit error is tolerated). The
// final byte of the event is reported as the physical-trailer status.
//
// Timing: passive; `fire` marks a byte transfer. Results appear with a
// one-cycle `done` pulse after the `last` byte and stay until the next one.
// The checks follow the L2 header/trailer layout; the result flags, the
// parity range and the tolerance rule's exact form are this design's reading.
module l2_frame_check
  import l2_link_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fire,           // byte transferred this cycle
  input  byte_beat_t beat,
  input  logic [7:0] exp_bunch,      // bunch # expected for this event
  output logic       done,
  output logic       no_trailer,     // event ended before its logical trailer
  output logic       bunch_mismatch, // T0 != header B5
  output logic       dtype_mismatch, // T1 != header B4
  output logic       parity_err,     // T2 or T3 wrong
  output logic       sync_err,       // neither bunch copy matches exp_bunch
  output logic [7:0] bunch,          // bunch # taken (trailer copy if header is off)
  output logic [7:0] phys_status     // last byte of the event
);

  localparam int IW = 20;
  logic [IW-1:0] idx, tpos;
  logic [7:0] nobj, hlen, olen, h_dt, h_bx, t_bx, t_dt, t_pe, t_po, lp_e, lp_o;
  logic       t_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; tpos <= '1; t_seen <= 1'b0;
      nobj <= '0; hlen <= '0; olen <= '0; h_dt <= '0; h_bx <= '0;
      t_bx <= '0; t_dt <= '0; t_pe <= '0; t_po <= '0; lp_e <= '0; lp_o <= '0;
      done <= 1'b0; no_trailer <= 1'b0; bunch_mismatch <= 1'b0;
      dtype_mismatch <= 1'b0; parity_err <= 1'b0; sync_err <= 1'b0;
      bunch <= '0; phys_status <= '0;
    end else begin
      done <= 1'b0;
      if (idx == IW'(3))
        tpos <= IW'({hlen, 2'b00}) + IW'({16'(nobj * olen), 2'b00});
      if (fire) begin
        idx <= idx + 1'b1;
        unique case (idx)
          IW'(0): nobj <= beat.data;
          IW'(1): hlen <= beat.data;
          IW'(2): olen <= beat.data;
          IW'(4): h_dt <= beat.data;
          IW'(5): h_bx <= beat.data;
          default: ;
        endcase
        if (idx < 3 || idx < tpos) begin
          if (idx[0]) lp_o <= lp_o ^ beat.data;
          else        lp_e <= lp_e ^ beat.data;
        end
        if (idx >= 3) begin
          if (idx == tpos)          t_bx <= beat.data;
          if (idx == tpos + 1)      t_dt <= beat.data;
          if (idx == tpos + 2)      t_pe <= beat.data;
          if (idx == tpos + 3) begin
            t_po   <= beat.data;
            t_seen <= 1'b1;
          end
        end
        if (beat.last) begin
          done           <= 1'b1;
          phys_status    <= beat.data;
          no_trailer     <= !t_seen;
          bunch_mismatch <= t_seen && (t_bx != h_bx);
          dtype_mismatch <= t_seen && (t_dt != h_dt);
          parity_err     <= t_seen && ((t_pe != lp_e) || (t_po != lp_o));
          sync_err       <= (h_bx != exp_bunch) && (!t_seen || t_bx != exp_bunch);
          bunch          <= (h_bx == exp_bunch || !t_seen) ? h_bx : t_bx;
          idx <= '0; tpos <= '1; t_seen <= 1'b0; lp_e <= '0; lp_o <= '0;
        end
      end
    end
  end

endmodule
