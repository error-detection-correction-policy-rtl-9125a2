// l2_trailer_gen: sender-side L2 event formatter.
//
// Input: the bytes of one L2 event, header first (byte 4 = data type #,
// byte 5 = bunch #), then the objects, with `last` on the final object byte.
// Output: the same bytes, then the 4-byte logical trailer
//     T0 bunch #  (= header B5)
//     T1 data type # (= header B4)        (swapped even/odd from the header)
//     T2 longitudinal parity (XOR) of the even-numbered bytes
//     T3 longitudinal parity of the odd-numbered bytes
// then zero bytes up to the next multiple of 16 bytes, with `last` on the
// final byte. The parities run over every byte before the trailer, counted
// from header byte 0; that range is this design's reading of the format.
// The byte index is 20 bits wide, enough for the largest event the header
// can describe (255 objects of 255 words plus a 255-word header).
// Header and trailer carry the bunch # redundantly so a receiver can still
// find a one-bit error in one of them.
//
// Timing: valid/ready streams, one byte per cycle; the trailer and padding
// follow the last input byte without a gap while `out_ready` is high.
module l2_trailer_gen
  import l2_link_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  byte_beat_t in_beat,
  output logic       in_ready,
  output logic       out_valid,
  output byte_beat_t out_beat,
  input  logic       out_ready
);

  typedef enum logic [1:0] {S_PASS, S_TRL, S_PAD} state_e;
  state_e     state;
  logic [3:0] pos;          // output byte count modulo 16
  logic [1:0] tidx;
  logic [19:0] idx;         // byte index within the event (input part)
  logic [7:0] dtype, bunch, lp_even, lp_odd;

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_beat  = '{data: 8'h00, last: 1'b0};
    unique case (state)
      S_PASS: begin
        out_valid     = in_valid;
        out_beat.data = in_beat.data;
        in_ready      = out_ready;
      end
      S_TRL: begin
        out_valid = 1'b1;
        unique case (tidx)
          2'd0: out_beat.data = bunch;
          2'd1: out_beat.data = dtype;
          2'd2: out_beat.data = lp_even;
          default: out_beat.data = lp_odd;
        endcase
        out_beat.last = (tidx == 2'd3) && (pos == 4'd15);
      end
      default: begin              // S_PAD
        out_valid     = 1'b1;
        out_beat.last = (pos == 4'd15);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_PASS; pos <= '0; tidx <= '0; idx <= '0;
      dtype <= '0; bunch <= '0; lp_even <= '0; lp_odd <= '0;
    end else if (out_valid && out_ready) begin
      pos <= pos + 1'b1;
      unique case (state)
        S_PASS: begin
          idx <= idx + 1'b1;
          if (idx[0]) lp_odd  <= lp_odd  ^ in_beat.data;
          else        lp_even <= lp_even ^ in_beat.data;
          if (idx == 20'd4) dtype <= in_beat.data;
          if (idx == 20'd5) bunch <= in_beat.data;
          if (in_beat.last) begin
            state <= S_TRL;
            tidx  <= '0;
          end
        end
        S_TRL: begin
          tidx <= tidx + 1'b1;
          if (tidx == 2'd3) begin
            if (pos == 4'd15) begin
              state <= S_PASS; idx <= '0; lp_even <= '0; lp_odd <= '0;
            end else begin
              state <= S_PAD;
            end
          end
        end
        default: begin
          if (pos == 4'd15) begin
            state <= S_PASS; idx <= '0; lp_even <= '0; lp_odd <= '0;
          end
        end
      endcase
    end
  end

endmodule
