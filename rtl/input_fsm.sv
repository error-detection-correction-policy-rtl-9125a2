// input_fsm: two-state (IDLE / EVENT) input state machine of a link receiver.
//
// Every received character is classified and handled by the current state:
//
//   character        IDLE (FIFO disabled)            EVENT (FIFO enabled)
//   Pad              ignored                          ignored
//   data             counted (idle data error)        written, tag DATA
//   violation        counted (idle error)             written, tag ERROR
//   Begin            -> EVENT, start of event         missed End: write END
//                                                     (forced flag), stay in
//                                                     EVENT for the new event
//   End              missed Begin: counted, stay      write END, -> IDLE
//   other special    counted                          written, tag ERROR
//
// So two Begins or two Ends in a row insert an event boundary, and after any
// lost boundary the machine is ready to see the next Begin. While `reframing`
// is high nothing is written and the state is kept; an event that sees a
// reframe gets the reframe flag in its END mark. When the FIFO has only one
// place left, DATA/ERROR bytes are dropped (overflow flag and count) so that
// the END mark still fits. `clear` (SCL_INITIALIZE) returns to IDLE.
//
// Timing: one character per clock; the FIFO write for a character is
// combinational on the character, the state changes at the clock edge.
// The state table follows the design notes; the END flag byte, the overflow
// rule and the count outputs are this design's choices.
module input_fsm
  import l2_link_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,          // SCL_INITIALIZE: back to IDLE
  input  link_sym_t   rx_sym,
  input  logic        reframing,      // from reframe_ctrl: ignore input
  input  logic        fifo_afull,     // one free FIFO place left
  input  logic        fifo_full,
  output logic        fifo_wr,
  output fifo_entry_t fifo_wdata,
  output logic        in_event,       // state bit: 1 = EVENT
  output fsm_events_t ev              // one-cycle pulses for the counters
);

  typedef enum logic {IDLE = 1'b0, EVENT = 1'b1} state_e;
  state_e state, state_nx;
  logic   flag_reframe, flag_ovf;     // flags of the event being received
  logic   set_ovf;

  logic is_pad, is_begin, is_end, is_other, is_data, is_viol;
  assign is_pad   = is_special(rx_sym, SC_PAD);
  assign is_begin = is_special(rx_sym, SC_BEGIN);
  assign is_end   = is_special(rx_sym, SC_END);
  assign is_data  = rx_sym.valid && rx_sym.kind == SYM_DATA;
  assign is_viol  = rx_sym.valid && rx_sym.kind == SYM_VIOL;
  assign is_other = rx_sym.valid && rx_sym.kind == SYM_SPECIAL &&
                    !is_pad && !is_begin && !is_end;

  logic [7:0] end_flags;
  always_comb begin
    end_flags = '0;
    end_flags[EF_REFRAME]  = flag_reframe;
    end_flags[EF_OVERFLOW] = flag_ovf;
  end

  always_comb begin
    state_nx   = state;
    fifo_wr    = 1'b0;
    fifo_wdata = '{tag: TAG_DATA, data: rx_sym.code};
    ev         = '0;
    set_ovf    = 1'b0;
    if (!reframing && rx_sym.valid) begin
      unique case (state)
        IDLE: begin
          if (is_begin) begin
            state_nx     = EVENT;
            ev.begin_evt = 1'b1;
          end else if (is_end)   ev.missed_begin = 1'b1;
          else if (is_data)      ev.idle_data    = 1'b1;
          else if (is_viol)      ev.idle_err     = 1'b1;
          else if (is_other)     ev.idle_other   = 1'b1;
        end
        EVENT: begin
          if (is_end || is_begin) begin
            fifo_wdata.tag  = TAG_END;
            fifo_wdata.data = end_flags;
            fifo_wdata.data[EF_FORCED] = is_begin;
            fifo_wr = !fifo_full;
            ev.overflow = fifo_full;
            if (is_end) begin
              state_nx   = IDLE;
              ev.end_evt = 1'b1;
            end else begin
              ev.missed_end = 1'b1;
            end
          end else if (is_data || is_viol || is_other) begin
            fifo_wdata.tag = is_data ? TAG_DATA : TAG_ERROR;
            ev.event_err   = !is_data;
            if (fifo_afull) begin
              ev.overflow = 1'b1;
              set_ovf     = 1'b1;
            end else begin
              fifo_wr = 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      flag_reframe <= 1'b0;
      flag_ovf     <= 1'b0;
    end else if (clear) begin
      state        <= IDLE;
      flag_reframe <= 1'b0;
      flag_ovf     <= 1'b0;
    end else begin
      state <= state_nx;
      if (ev.begin_evt || ev.end_evt || ev.missed_end) begin
        flag_reframe <= 1'b0;         // a new event starts with clean flags
        flag_ovf     <= 1'b0;
      end else begin
        if (reframing && state == EVENT) flag_reframe <= 1'b1;
        if (set_ovf) flag_ovf <= 1'b1;
      end
    end
  end

  assign in_event = (state == EVENT);

endmodule
