// euart_ctrl: eUART control unit and register file.
//
// Holds the eight 16-bit registers the processor sees on its memory
// interface and turns register accesses and events of the other blocks into
// commands, status flags and an interrupt.
//
//   addr 0 STATUS        flags, see the ST_* positions in euart_pkg. The
//                        event flags (RX_FULL, errors, TIME_MARK, OVERRUN,
//                        TX_DONE) are sticky and cleared by writing 1;
//                        TX_BUSY, SYNCED, SYNC_ACTIVE, DIAG_TIMING and
//                        SEND_PEND show the current state.
//   addr 1 CONFIGURATION interrupt enable mask, same bit positions.
//   addr 2 EUART CONFIG  parity mode, oversampling mode and threshold
//                        (econfig_t).
//   addr 3 COMMAND       write: SYNC starts the search for the
//                        synchronisation pattern, SEND sends MESSAGE now,
//                        SEND_MARK sends it at the next time mark,
//                        SYNC_STOP ends a search. Read: the 16 samples of
//                        the last bit cell that failed evaluation.
//   addr 4 MESSAGE       write: byte to send; read: last byte received
//                        (clears RX_FULL).
//   addr 5 TIMER         bit-cell timer; a write sets it.
//   addr 6 TS/TM         time mark compared with TIMER.
//   addr 7 EUBRS         bit period, clock cycles in Q12.4; written by
//                        software or by a completed synchronisation.
//
// irq_o is high while any STATUS bit enabled in CONFIGURATION is set.
// Reads are combinational (rdata_o is valid in the cycle of sel_i); writes
// take effect at the clock edge. The register names and their order come
// from the document's block diagram; every field, encoding and reset value
// is this design's choice. EUBRS resets to BRS_RESET.
module euart_ctrl
  import euart_pkg::*;
#(
  parameter brs_t BRS_RESET = brs_t'(50 << BRS_FRAC)
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  // memory interface
  input  logic                 sel_i,
  input  logic                 we_i,
  input  reg_addr_e            addr_i,
  input  reg_t                 wdata_i,
  output reg_t                 rdata_o,
  output logic                 irq_o,
  // configuration to the datapath
  output econfig_t             econfig_o,
  output brs_t                 brs_o,
  output reg_t                 mark_o,
  output logic                 timer_we_o,
  output reg_t                 timer_wdata_o,
  input  reg_t                 timer_i,
  // synchronisation
  output logic                 sync_en_o,
  output logic                 resync_o,     // search ended successfully
  input  logic                 sync_done_i,
  input  brs_t                 sync_brs_i,
  // transmitter
  output logic                 tx_start_o,
  output logic [DATA_BITS-1:0] tx_data_o,
  input  logic                 tx_busy_i,
  input  logic                 tx_done_i,
  // time mark
  input  logic                 mark_i,
  // error control report
  input  logic                 report_i,
  input  logic [DATA_BITS-1:0] rx_data_i,
  input  logic                 parity_err_i,
  input  logic                 frame_err_i,
  input  logic                 sample_err_i,
  input  logic                 bit_err_i,
  input  logic                 diag_timing_i,
  input  samples_t             pattern_i
);

  reg_t                 status, sticky_q, ien_q;
  econfig_t             econfig_q;
  brs_t                 brs_q;
  reg_t                 mark_q;
  logic [DATA_BITS-1:0] txd_q, rxd_q;
  logic                 synced_q, sync_act_q, pend_q;
  logic                 wr, rd;

  localparam reg_t STICKY = reg_t'((1 << ST_RX_FULL) | (1 << ST_PARITY_ERR) |
                                   (1 << ST_FRAME_ERR) | (1 << ST_SAMPLE_ERR) |
                                   (1 << ST_BIT_ERR) | (1 << ST_TIME_MARK) |
                                   (1 << ST_OVERRUN) | (1 << ST_TX_DONE));

  assign wr = sel_i && we_i;
  assign rd = sel_i && !we_i;

  always_comb begin
    status                 = sticky_q & STICKY;
    status[ST_TX_BUSY]     = tx_busy_i;
    status[ST_SYNCED]      = synced_q;
    status[ST_SYNC_ACTIVE] = sync_act_q;
    status[ST_DIAG_TIMING] = diag_timing_i;
    status[ST_SEND_PEND]   = pend_q;
  end

  always_comb begin
    unique case (addr_i)
      ADDR_STATUS:  rdata_o = status;
      ADDR_CONFIG:  rdata_o = ien_q;
      ADDR_ECONFIG: rdata_o = econfig_q;
      ADDR_COMMAND: rdata_o = pattern_i;
      ADDR_MESSAGE: rdata_o = reg_t'(rxd_q);
      ADDR_TIMER:   rdata_o = timer_i;
      ADDR_TSTM:    rdata_o = mark_q;
      ADDR_EUBRS:   rdata_o = brs_q;
      default:      rdata_o = '0;
    endcase
  end

  // A send is started by the SEND command, or by the time mark when a
  // SEND_MARK command is pending; a busy transmitter ignores it.
  assign tx_start_o = !tx_busy_i &&
                      ((wr && addr_i == ADDR_COMMAND && wdata_i[CMD_SEND]) ||
                       (pend_q && mark_i));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sticky_q   <= '0;
      ien_q      <= '0;
      econfig_q  <= '0;
      brs_q      <= BRS_RESET;
      mark_q     <= '0;
      txd_q      <= '0;
      rxd_q      <= '0;
      synced_q   <= 1'b0;
      sync_act_q <= 1'b0;
      pend_q     <= 1'b0;
    end else begin
      // register writes
      if (wr) begin
        unique case (addr_i)
          ADDR_STATUS:  sticky_q  <= sticky_q & ~wdata_i;
          ADDR_CONFIG:  ien_q     <= wdata_i;
          ADDR_ECONFIG: econfig_q <= wdata_i;
          ADDR_COMMAND: begin
            if (wdata_i[CMD_SYNC]) begin
              sync_act_q <= 1'b1;
              synced_q   <= 1'b0;
            end
            if (wdata_i[CMD_SYNC_STOP]) sync_act_q <= 1'b0;
            if (wdata_i[CMD_SEND_MARK]) pend_q     <= 1'b1;
          end
          ADDR_MESSAGE: txd_q  <= wdata_i[DATA_BITS-1:0];
          ADDR_TSTM:    mark_q <= wdata_i;
          ADDR_EUBRS:   brs_q  <= wdata_i;
          default: ;
        endcase
      end
      if (rd && addr_i == ADDR_MESSAGE) sticky_q[ST_RX_FULL] <= 1'b0;

      // events
      if (resync_o) begin
        sync_act_q <= 1'b0;
        synced_q   <= 1'b1;
        brs_q      <= sync_brs_i;
      end
      if (mark_i) begin
        sticky_q[ST_TIME_MARK] <= 1'b1;
        if (pend_q && !tx_busy_i) pend_q <= 1'b0;
      end
      if (tx_done_i) sticky_q[ST_TX_DONE] <= 1'b1;
      if (report_i) begin
        rxd_q <= rx_data_i;
        sticky_q[ST_RX_FULL] <= 1'b1;
        if (sticky_q[ST_RX_FULL] && !(rd && addr_i == ADDR_MESSAGE))
          sticky_q[ST_OVERRUN] <= 1'b1;
        if (parity_err_i) sticky_q[ST_PARITY_ERR] <= 1'b1;
        if (frame_err_i)  sticky_q[ST_FRAME_ERR]  <= 1'b1;
        if (sample_err_i) sticky_q[ST_SAMPLE_ERR] <= 1'b1;
        if (bit_err_i)    sticky_q[ST_BIT_ERR]    <= 1'b1;
      end
    end
  end

  assign irq_o         = |(status & ien_q);
  assign econfig_o     = econfig_q;
  assign brs_o         = brs_q;
  assign mark_o        = mark_q;
  assign timer_we_o    = wr && addr_i == ADDR_TIMER;
  assign timer_wdata_o = wdata_i;
  assign sync_en_o     = sync_act_q;
  assign resync_o      = sync_done_i && sync_act_q;
  assign tx_data_o     = txd_q;

  // The transmitter is only started when it is idle.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   tx_start_o |-> !tx_busy_i);

endmodule
