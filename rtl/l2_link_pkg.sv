// l2_link_pkg: types and constants shared by the L2 link transmitter and
// receiver.
//
// A link symbol is what the serial-link chipset hands over per character: a
// data byte, a special (control) character with its code, or a code violation
// (a character the receiver could not decode). Pad, Begin Event and End Event
// are special characters. The receive FIFO stores bytes tagged DATA, ERROR or
// END, as the input state machine of this design requires.
//
// The byte width, the number of valid special codes (12) and the code values of
// Pad/Begin/End are choices of this design; the board type IDs (FIC 0, SLIC 1,
// MBT 2) and status bit 7 ("any receive error") follow the physical trailer
// definition of the L2 link format.
package l2_link_pkg;

  // ---- link symbols --------------------------------------------------------
  typedef enum logic [1:0] {
    SYM_DATA    = 2'd0,   // ordinary data byte
    SYM_SPECIAL = 2'd1,   // special (control) character, code in .code
    SYM_VIOL    = 2'd2    // code violation / undecodable character
  } sym_kind_e;

  typedef struct packed {
    logic      valid;     // a character was received / is to be sent this cycle
    sym_kind_e kind;
    logic [7:0] code;     // data byte or special-character code
  } link_sym_t;

  // Special-character codes. Codes at or above NUM_SPECIAL are "unknown".
  localparam int unsigned NUM_SPECIAL = 12;
  localparam logic [7:0]  SC_PAD   = 8'd0;
  localparam logic [7:0]  SC_BEGIN = 8'd1;
  localparam logic [7:0]  SC_END   = 8'd2;

  // ---- receive FIFO entries ------------------------------------------------
  typedef enum logic [1:0] {
    TAG_DATA  = 2'd0,     // received data byte
    TAG_ERROR = 2'd1,     // violation or unexpected special character
    TAG_END   = 2'd2      // end-of-event mark; byte holds end flags
  } fifo_tag_e;

  typedef struct packed {
    fifo_tag_e  tag;
    logic [7:0] data;
  } fifo_entry_t;

  // Flags carried in the byte of a TAG_END entry.
  localparam int unsigned EF_FORCED   = 0;  // boundary inserted: End was missed
  localparam int unsigned EF_REFRAME  = 1;  // link reframed during the event
  localparam int unsigned EF_OVERFLOW = 2;  // FIFO full, bytes were dropped

  // ---- physical trailer status byte -----------------------------------------
  localparam logic [1:0] TYPE_FIC  = 2'd0;
  localparam logic [1:0] TYPE_SLIC = 2'd1;
  localparam logic [1:0] TYPE_MBT  = 2'd2;

  localparam int unsigned ST_ANY_ERR  = 7;  // any receive error in this event
  localparam int unsigned ST_OVERFLOW = 5;  // bytes dropped (FIFO full)
  localparam int unsigned ST_REFRAME  = 4;  // reframing during the event
  localparam int unsigned ST_FORCED   = 3;  // missed End, boundary inserted
  localparam int unsigned ST_ERRCHAR  = 2;  // violation/unexpected special inside

  // ---- byte stream between blocks ---------------------------------------------
  typedef struct packed {
    logic [7:0] data;
    logic       last;     // final byte of the event (End of Event follows)
  } byte_beat_t;

  // ---- event counter pulses (one cycle each) ----------------------------------
  typedef struct packed {
    logic begin_evt;      // Begin accepted in IDLE (normal start of event)
    logic end_evt;        // End accepted in EVENT (normal end)
    logic missed_end;     // Begin while in EVENT
    logic missed_begin;   // End while in IDLE
    logic idle_data;      // data character while IDLE
    logic idle_err;       // violation while IDLE
    logic idle_other;     // other special character while IDLE
    logic event_err;      // violation/other special written as ERROR in EVENT
    logic overflow;       // FIFO write dropped
  } fsm_events_t;

  function automatic logic is_special(link_sym_t s, logic [7:0] c);
    return s.valid && s.kind == SYM_SPECIAL && s.code == c;
  endfunction

endpackage
