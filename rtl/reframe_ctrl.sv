// reframe_ctrl: reframing control for a serial-link receiver ("on provocation").
//
// The receiver chip only searches for a new frame (character) boundary while
// its reframe-enable pin is high. This block raises that pin, and the
// `reframing` flag that stops all input into the event FIFO, when:
//   - the board comes out of reset (power-up),
//   - N_BAD consecutive received characters are violations or special
//     characters with an unknown code,
//   - the front-panel request pulses, or
//   - the register request pulses (part of SCL_INITIALIZE handling), or
//   - the chip reports loss of frequency (PLL) lock (`link_lock` low).
// It stays in reframing until the PLL is locked and a Pad character is
// identified; there is no timeout. Each entry into reframing gives a one-cycle `reframe_pulse` for a
// counter and sets the sticky `led` flip-flop, cleared by `led_clr`.
//
// Timing: a request or the N_BAD-th bad character sets `reframing` on the next
// clock edge; a Pad clears it on the next edge (the Pad itself is not data).
// The triggers, "stays until a Pad", the LED and the counter follow the design
// notes, as does treating a lock loss as one more cause of reframing; N_BAD's value (not given) and the absence of a timeout are choices.
module reframe_ctrl
  import l2_link_pkg::*;
#(
  parameter int unsigned N_BAD = 4   // consecutive bad characters that provoke reframing
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_sym_t rx_sym,          // received character from the chip
  input  logic      fp_req,          // front-panel reframe request (pulse)
  input  logic      reg_req,         // register / SCL_INITIALIZE reframe request (pulse)
  input  logic      led_clr,         // clear the LED flip-flop
  input  logic      link_lock,       // receiver PLL locked
  output logic      reframing,       // no input into the FIFO while high
  output logic      rf_en,           // to the receiver chip: search for framing
  output logic      reframe_pulse,   // one cycle on each entry into reframing
  output logic      led
);

  localparam int CW = $clog2(N_BAD + 1);
  logic [CW-1:0] bad_cnt;
  logic bad_char, good_char, trigger;

  assign bad_char  = rx_sym.valid &&
                     (rx_sym.kind == SYM_VIOL ||
                      (rx_sym.kind == SYM_SPECIAL && rx_sym.code >= 8'(NUM_SPECIAL)));
  assign good_char = rx_sym.valid && !bad_char;
  assign trigger   = fp_req || reg_req || !link_lock ||
                     (!reframing && bad_char && bad_cnt == CW'(N_BAD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reframing     <= 1'b1;           // power-up: frame before anything else
      reframe_pulse <= 1'b1;
      led           <= 1'b1;
      bad_cnt       <= '0;
    end else begin
      reframe_pulse <= 1'b0;
      if (trigger) begin
        reframing     <= 1'b1;
        reframe_pulse <= !reframing;
        led           <= 1'b1;
        bad_cnt       <= '0;
      end else if (reframing) begin
        bad_cnt <= '0;
        if (is_special(rx_sym, SC_PAD)) reframing <= 1'b0;
      end else if (bad_char) begin
        bad_cnt <= bad_cnt + 1'b1;
      end else if (good_char) begin
        bad_cnt <= '0;
      end
      if (led_clr && !trigger) led <= 1'b0;
    end
  end

  assign rf_en = reframing;

endmodule
