// euart: enhanced UART extension module for time-triggered field buses.
//
// A UART for single-wire TTP/A or LIN networks whose nodes run from
// imprecise RC oscillators. Three mechanisms set it apart from a standard
// UART:
//   * it finds the bit period on its own, by searching the bus traffic for
//     the synchronisation pattern (SYNC_CELLS equidistant bit cells within
//     2^-4) and loading the measured period, with 4 fractional bits, into
//     the baud rate setting;
//   * it samples every bit cell 16 times and evaluates the samples by
//     majority or by a configurable threshold, keeping the samples of a
//     failing cell so that a lost synchronisation can be told from noise;
//   * it times transmissions from a bit-cell time base, so a frame can be
//     started exactly at a time mark.
// Structure (after the document's block diagram): bus driver with glitch
// filter, receiver (with sample evaluator), transmitter, error control,
// timing, synchronisation detector, and a control unit holding the register
// file (STATUS, CONFIGURATION, EUART CONFIG, COMMAND, MESSAGE, TIMER, TS/TM,
// EUBRS) on the processor's memory interface, with one interrupt line.
// Each of receiver and transmitter has its own instance of the enhanced
// baud rate generator so that the receiver can align on a start edge
// without disturbing a transmission; this split is this design's choice.
//
// Interface: clk_i/rst_ni (asynchronous active-low reset); the memory
// interface sel_i/we_i/addr_i/wdata_i/rdata_o (combinational read, write at
// the clock edge); irq_o; rxd_i (bus level, asynchronous) and txd_o (bus
// drive, 1 = recessive). On a wired-AND bus the node reads back its own
// frames, which error control uses to detect collisions.
module euart
  import euart_pkg::*;
#(
  parameter int unsigned SYNC_CELLS = 8,
  parameter int unsigned FILTER_LEN = 3,
  parameter brs_t        BRS_RESET  = brs_t'(50 << BRS_FRAC)
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      sel_i,
  input  logic      we_i,
  input  reg_addr_e addr_i,
  input  reg_t      wdata_i,
  output reg_t      rdata_o,
  output logic      irq_o,
  input  logic      rxd_i,
  output logic      txd_o
);

  econfig_t             econfig;
  brs_t                 brs, sync_brs;
  reg_t                 mark, timer, timer_wdata;
  logic                 timer_we, sync_en, sync_done, resync, mark_evt;
  logic                 tx_start, tx_busy, tx_done, tx_bit, tx_restart, tx_tick;
  logic [DATA_BITS-1:0] tx_data;
  logic                 rx, rx_edge, rx_fall, rx_restart, rx_tick, rx_busy;
  logic                 frame_valid;
  rx_frame_t            frame;
  logic                 report, par_err, frm_err, smp_err, bit_err, diag_t;
  logic [DATA_BITS-1:0] rx_data;
  samples_t             pattern;

  euart_busdriver #(.FILTER_LEN(FILTER_LEN)) u_bus (
    .clk_i, .rst_ni,
    .rxd_i,
    .txd_o,
    .tx_bit_i (tx_bit),
    .rx_o     (rx),
    .rx_edge_o(rx_edge),
    .rx_fall_o(rx_fall)
  );

  euart_sync #(.SYNC_CELLS(SYNC_CELLS)) u_sync (
    .clk_i, .rst_ni,
    .en_i  (sync_en),
    .edge_i(rx_edge),
    .done_o(sync_done),
    .brs_o (sync_brs)
  );

  euart_baudgen #(.RESTART_HALF(1'b1)) u_rx_gen (
    .clk_i, .rst_ni,
    .en_i     (rx_busy),
    .restart_i(rx_restart),
    .brs_i    (brs),
    .tick_o   (rx_tick)
  );

  euart_rx u_rx (
    .clk_i, .rst_ni,
    .en_i          (!sync_en),
    .rx_i          (rx),
    .rx_fall_i     (rx_fall),
    .tick_i        (rx_tick),
    .parity_en_i   (econfig.parity != PAR_NONE),
    .os_mode_i     (econfig.os_mode),
    .threshold_i   (econfig.threshold),
    .baud_restart_o(rx_restart),
    .busy_o        (rx_busy),
    .frame_valid_o (frame_valid),
    .frame_o       (frame)
  );

  euart_baudgen #(.RESTART_HALF(1'b0)) u_tx_gen (
    .clk_i, .rst_ni,
    .en_i     (1'b1),
    .restart_i(tx_restart),
    .brs_i    (brs),
    .tick_o   (tx_tick)
  );

  euart_tx u_tx (
    .clk_i, .rst_ni,
    .start_i       (tx_start),
    .data_i        (tx_data),
    .parity_i      (econfig.parity),
    .tick_i        (tx_tick),
    .baud_restart_o(tx_restart),
    .tx_bit_o      (tx_bit),
    .busy_o        (tx_busy),
    .done_o        (tx_done)
  );

  euart_errctl u_err (
    .clk_i, .rst_ni,
    .parity_i     (econfig.parity),
    .rx_start_i   (rx_restart),
    .tx_busy_i    (tx_busy),
    .tx_data_i    (tx_data),
    .frame_valid_i(frame_valid),
    .frame_i      (frame),
    .report_o     (report),
    .data_o       (rx_data),
    .parity_err_o (par_err),
    .frame_err_o  (frm_err),
    .sample_err_o (smp_err),
    .bit_err_o    (bit_err),
    .diag_timing_o(diag_t),
    .pattern_o    (pattern)
  );

  euart_timing u_timing (
    .clk_i, .rst_ni,
    .brs_i        (brs),
    .resync_i     (resync),
    .timer_we_i   (timer_we),
    .timer_wdata_i(timer_wdata),
    .mark_i       (mark),
    .timer_o      (timer),
    .mark_o       (mark_evt)
  );

  euart_ctrl #(.BRS_RESET(BRS_RESET)) u_ctrl (
    .clk_i, .rst_ni,
    .sel_i, .we_i, .addr_i, .wdata_i, .rdata_o, .irq_o,
    .econfig_o    (econfig),
    .brs_o        (brs),
    .mark_o       (mark),
    .timer_we_o   (timer_we),
    .timer_wdata_o(timer_wdata),
    .timer_i      (timer),
    .sync_en_o    (sync_en),
    .resync_o     (resync),
    .sync_done_i  (sync_done),
    .sync_brs_i   (sync_brs),
    .tx_start_o   (tx_start),
    .tx_data_o    (tx_data),
    .tx_busy_i    (tx_busy),
    .tx_done_i    (tx_done),
    .mark_i       (mark_evt),
    .report_i     (report),
    .rx_data_i    (rx_data),
    .parity_err_i (par_err),
    .frame_err_i  (frm_err),
    .sample_err_i (smp_err),
    .bit_err_i    (bit_err),
    .diag_timing_i(diag_t),
    .pattern_i    (pattern)
  );

endmodule
