// tx_framer: turns an event byte stream into link characters.
//
// The link sends one character every clock. Between events it sends Pad
// characters, on which a receiver that lost its frame (character) boundary
// can lock again. An event is sent as Begin Event, its bytes as data
// characters, PADS_BEFORE_END Pads, then End Event: the Pads in front of End
// give a receiver that is reframing after a data error the chance to recover
// before the End and so keep the event boundary. While `hold` is high (link
// resynchronisation) no new event is started and only Pads are sent; an
// event already started is finished.
//
// Timing: `in_ready` is high in the cycle a data byte is sent; Begin and the
// trailing Pads/End cost 2 + PADS_BEFORE_END cycles per event. The use of
// Pads follows the design notes; the number of Pads is this design's choice.
module tx_framer
  import l2_link_pkg::*;
#(
  parameter int unsigned PADS_BEFORE_END = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hold,
  input  logic       in_valid,
  input  byte_beat_t in_beat,
  output logic       in_ready,
  output link_sym_t  tx_sym
);

  typedef enum logic [1:0] {T_IDLE, T_DATA, T_PADS, T_END} state_e;
  state_e state;
  logic [7:0] npad;

  localparam link_sym_t PAD_SYM = '{valid: 1'b1, kind: SYM_SPECIAL, code: SC_PAD};

  always_comb begin
    tx_sym   = PAD_SYM;
    in_ready = 1'b0;
    unique case (state)
      T_IDLE: if (in_valid && !hold) tx_sym.code = SC_BEGIN;
      T_DATA: if (in_valid) begin
        tx_sym   = '{valid: 1'b1, kind: SYM_DATA, code: in_beat.data};
        in_ready = 1'b1;
      end
      T_PADS: ;
      default: tx_sym.code = SC_END;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      npad  <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (in_valid && !hold) state <= T_DATA;
        T_DATA: if (in_valid && in_beat.last) begin
          npad  <= '0;
          state <= (PADS_BEFORE_END == 0) ? T_END : T_PADS;
        end
        T_PADS: begin
          npad <= npad + 1'b1;
          if (npad == 8'(PADS_BEFORE_END - 1)) state <= T_END;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
