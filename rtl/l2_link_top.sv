// l2_link_top: one end of an L2 serial link with error detection.
//
// The policy behind this design: keep an error inside one event on one
// channel, count every error where it is found, tag damaged events instead of
// guessing, and above all never lose an event boundary, because a lost
// boundary forces a full SCL_INITIALIZE of every front-end crate.
//
// Transmit path: l2_trailer_gen appends the L2 logical trailer (bunch # and
// data type repeated from the header, even/odd longitudinal parity) and pads
// the event to 16 bytes; tx_framer sends it as Begin, data, Pads, End, with
// Pads between events. With TX_PHYS_TRAILER set (an output board such as an
// MBT Out) a 2-byte physical trailer is appended before framing. In self-test
// mode selftest_gen drives the link instead.
//
// Receive path: reframe_ctrl puts the receiver chip into reframing on
// power-up, on N_BAD bad characters in a row, on a front-panel or register
// request, on SCL_INITIALIZE and on loss of PLL lock, until a Pad is seen. input_fsm (IDLE/EVENT)
// writes event bytes into event_fifo tagged DATA/ERROR/END and repairs
// doubled Begin/End boundaries. phys_trailer_gen reads the FIFO and appends
// the physical trailer (parity of the received bytes, status with board type
// and error bits). l2_frame_check checks each outgoing event's header against
// its trailer and the expected bunch #. status_regs counts every kind of
// error for register readback. selftest_chk verifies the test sequence.
//
// L1 Busy is raised when the FIFO passes its high-water mark and, if
// BUSY_ON_REFRAME is set, while the link is reframing (useful only for an
// unbuffered source). A bunch-# mismatch sets the sticky `sync_error`, which
// only SCL_INITIALIZE clears. The serializer/deserializer chipset is outside
// this design: its interface is `tx_sym`, `rx_sym`, `rx_lock` and `rf_en`.
// The block split follows the design notes; the register map, FIFO depth and
// the self-test/transmit arbitration (self-test takes the link at once, so an
// event in flight is cut) are this design's choices.
module l2_link_top
  import l2_link_pkg::*;
#(
  parameter logic [1:0]  TYPE_ID         = TYPE_SLIC,
  parameter bit          MBT_INPUT       = 1'b0,
  parameter int unsigned FIFO_DEPTH      = 1024,
  parameter int unsigned FIFO_HWM        = 768,
  parameter int unsigned N_BAD           = 4,
  parameter int unsigned PADS_BEFORE_END = 2,
  parameter bit          BUSY_ON_REFRAME = 1'b1,
  parameter bit          TX_PHYS_TRAILER = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // timing system
  input  logic        scl_init,        // SCL_INITIALIZE (pulse)
  input  logic [7:0]  scl_bunch,       // bunch # expected for the event being checked
  output logic        l1_busy,
  output logic        sync_error,      // event synchronisation error, sticky
  // transmit: L2 event in, link characters out
  input  logic        ev_in_valid,
  input  byte_beat_t  ev_in_beat,
  output logic        ev_in_ready,
  output link_sym_t   tx_sym,
  // receive: link characters in, events with physical trailer out
  input  link_sym_t   rx_sym,
  output logic        rf_en,
  input  logic        rx_lock,         // deserializer PLL locked
  output logic        ev_out_valid,
  output byte_beat_t  ev_out_beat,
  input  logic        ev_out_ready,
  // per-event check result
  output logic        chk_done,
  output logic [4:0]  chk_flags,       // {sync, parity, dtype, bunch, no_trailer}
  output logic [7:0]  chk_bunch,
  output logic [7:0]  chk_phys_status,
  // front panel
  input  logic        fp_reframe,
  output logic        led,
  output logic        selftest_pass,   // test point: one pulse per sequence pass received
  output logic        selftest_err,    // test point: one pulse per self-test error
  output logic        selftest_wrap,   // test point: one pulse per sequence pass sent
  // register port
  input  logic [4:0]  reg_addr,
  input  logic        reg_wr,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata
);

  localparam int unsigned NCNT = 14;

  // ---- control ----------------------------------------------------------
  logic selftest_en, tx_hold, reg_reframe, led_clr, cnt_clr;

  // ---- transmit path ------------------------------------------------------
  logic       tg_valid, tg_ready;
  byte_beat_t tg_beat;
  link_sym_t  fr_sym, st_sym;

  l2_trailer_gen u_trl (
    .clk, .rst_n,
    .in_valid(ev_in_valid), .in_beat(ev_in_beat), .in_ready(ev_in_ready),
    .out_valid(tg_valid), .out_beat(tg_beat), .out_ready(tg_ready)
  );

  // Output boards (MBT Out) also append a 2-byte physical trailer to what
  // they send; the parity then covers the bytes received from the processor.
  logic       fr_valid, fr_ready;
  byte_beat_t fr_beat;
  if (TX_PHYS_TRAILER) begin : g_tx_ptrl
    logic        ad_empty, ad_rd;
    fifo_entry_t ad_rdata;
    tx_tag_adapter u_adapt (
      .clk, .rst_n, .in_valid(tg_valid), .in_beat(tg_beat), .in_ready(tg_ready),
      .empty(ad_empty), .rdata(ad_rdata), .rd(ad_rd)
    );
    phys_trailer_gen #(.TYPE_ID(TYPE_ID), .MBT_INPUT(1'b0)) u_tx_ptrl (
      .clk, .rst_n, .clear(scl_init),
      .fifo_empty(ad_empty), .fifo_rdata(ad_rdata), .fifo_rd(ad_rd),
      .out_valid(fr_valid), .out_beat(fr_beat), .out_ready(fr_ready)
    );
  end else begin : g_no_tx_ptrl
    assign fr_valid = tg_valid;
    assign fr_beat  = tg_beat;
    assign tg_ready = fr_ready;
  end

  tx_framer #(.PADS_BEFORE_END(PADS_BEFORE_END)) u_framer (
    .clk, .rst_n, .hold(tx_hold || selftest_en),
    .in_valid(fr_valid), .in_beat(fr_beat), .in_ready(fr_ready),
    .tx_sym(fr_sym)
  );

  selftest_gen u_stgen (
    .clk, .rst_n, .enable(selftest_en), .tx_sym(st_sym), .wrap(selftest_wrap)
  );

  assign tx_sym = selftest_en ? st_sym : fr_sym;

  // ---- receive path -------------------------------------------------------
  logic        reframing, reframe_pulse;
  link_sym_t   fsm_sym;
  logic        fifo_wr, fifo_rd, fifo_empty, fifo_full, fifo_afull, fifo_hwm;
  fifo_entry_t fifo_wdata, fifo_rdata;
  logic        in_event;
  fsm_events_t ev;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  reframe_ctrl #(.N_BAD(N_BAD)) u_reframe (
    .clk, .rst_n, .rx_sym,
    .fp_req(fp_reframe), .reg_req(reg_reframe || scl_init), .led_clr, .link_lock(rx_lock),
    .reframing, .rf_en, .reframe_pulse, .led
  );

  always_comb begin
    fsm_sym = rx_sym;
    if (selftest_en) fsm_sym.valid = 1'b0;   // test sequence is not event data
  end

  input_fsm u_fsm (
    .clk, .rst_n, .clear(scl_init), .rx_sym(fsm_sym), .reframing,
    .fifo_afull, .fifo_full, .fifo_wr, .fifo_wdata, .in_event, .ev
  );

  event_fifo #(.WIDTH($bits(fifo_entry_t)), .DEPTH(FIFO_DEPTH), .HWM(FIFO_HWM)) u_fifo (
    .clk, .rst_n, .flush(scl_init),
    .wr_en(fifo_wr), .wr_data(fifo_wdata),
    .rd_en(fifo_rd), .rd_data(fifo_rdata),
    .empty(fifo_empty), .full(fifo_full), .almost_full(fifo_afull),
    .hwm(fifo_hwm), .count(fifo_count)
  );

  phys_trailer_gen #(.TYPE_ID(TYPE_ID), .MBT_INPUT(MBT_INPUT)) u_ptrl (
    .clk, .rst_n, .clear(scl_init),
    .fifo_empty, .fifo_rdata, .fifo_rd,
    .out_valid(ev_out_valid), .out_beat(ev_out_beat), .out_ready(ev_out_ready)
  );

  logic c_notrl, c_bx, c_dt, c_par, c_sync;
  l2_frame_check u_chk (
    .clk, .rst_n, .fire(ev_out_valid && ev_out_ready), .beat(ev_out_beat),
    .exp_bunch(scl_bunch), .done(chk_done),
    .no_trailer(c_notrl), .bunch_mismatch(c_bx), .dtype_mismatch(c_dt),
    .parity_err(c_par), .sync_err(c_sync),
    .bunch(chk_bunch), .phys_status(chk_phys_status)
  );
  assign chk_flags = {c_sync, c_par, c_dt, c_bx, c_notrl};

  logic [15:0] st_err_cnt;
  selftest_chk u_stchk (
    .clk, .rst_n, .enable(selftest_en), .cnt_clr, .rx_sym,
    .err(selftest_err), .pass(selftest_pass), .err_cnt(st_err_cnt)
  );

  // ---- error state and counters ---------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   sync_error <= 1'b0;
    else if (scl_init)            sync_error <= 1'b0;
    else if (chk_done && c_sync)  sync_error <= 1'b1;
  end

  assign l1_busy = fifo_hwm || (BUSY_ON_REFRAME && reframing);

  logic [NCNT-1:0] cnt_inc;
  logic [15:0]     status_word;
  assign cnt_inc = {
    chk_done && c_notrl,          // 13 event without logical trailer
    chk_done && (c_bx || c_dt),   // 12 header/trailer mismatch
    chk_done && c_par,            // 11 logical-trailer parity error
    chk_done && c_sync,           // 10 event synchronisation error
    reframe_pulse,                //  9 reframings
    ev.overflow,                  //  8 bytes dropped, FIFO full
    ev.event_err,                 //  7 error characters inside events
    ev.idle_other,                //  6 other special characters in IDLE
    ev.idle_err,                  //  5 violations in IDLE
    ev.idle_data,                 //  4 data characters in IDLE
    ev.missed_begin,              //  3 End while IDLE
    ev.missed_end,                //  2 Begin while in EVENT
    ev.end_evt,                   //  1 events ended normally
    ev.begin_evt                  //  0 events begun
  };
  assign status_word = {9'd0, fifo_full, fifo_empty, sync_error, l1_busy, led,
                        reframing, in_event};

  status_regs #(.NCNT(NCNT)) u_regs (
    .clk, .rst_n, .reg_addr, .reg_wr, .reg_wdata, .reg_rdata,
    .cnt_inc, .status_in(status_word), .selftest_cnt(st_err_cnt),
    .fifo_level(16'(fifo_count)),
    .selftest_en, .tx_hold, .reframe_req(reg_reframe), .led_clr, .cnt_clr
  );

endmodule
