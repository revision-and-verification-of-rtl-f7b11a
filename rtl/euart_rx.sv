// euart_rx: oversampling UART receiver.
//
// Frame format: start bit (0), DATA_BITS data bits LSB first, an optional
// parity bit, one stop bit (1). A falling edge of the filtered bus line
// while idle starts a frame: the receiver pulses baud_restart_o, which
// aligns its own sample-tick generator on the edge, and from then on
// collects 16 samples per bit cell. After the 16th sample of a cell the
// sample evaluator decides the bit. A start bit that evaluates to 1 is a
// false start and the receiver returns to idle. After the stop bit the
// frame is handed out for one cycle on frame_o with frame_valid_o; it holds
// the raw parity and stop bits, a sampling-error flag and the 16 samples of
// the last cell whose evaluation failed, so that error control can judge
// the frame and software can inspect the samples.
//
// 16-fold oversampling and the two evaluation modes follow the document;
// the frame layout, the false-start rule and the way a frame is handed on
// are this design's choice. The receiver is ready for the next start edge
// half a sample period before the end of the stop bit.
module euart_rx
  import euart_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       en_i,
  input  logic       rx_i,          // filtered bus level
  input  logic       rx_fall_i,     // falling edge of rx_i
  input  logic       tick_i,        // sample tick (16 per bit cell)
  input  logic       parity_en_i,
  input  os_mode_e   os_mode_i,
  input  logic [4:0] threshold_i,
  output logic       baud_restart_o,
  output logic       busy_o,
  output logic       frame_valid_o,
  output rx_frame_t  frame_o
);

  localparam int unsigned IDX_W = $clog2(DATA_BITS + 3);

  typedef enum logic {RX_IDLE, RX_RECV} rx_state_e;

  rx_state_e            state_q;
  samples_t             samp_q, samp_full;
  logic [3:0]           scnt_q;
  logic [IDX_W-1:0]     idx_q;     // 0 start, 1..8 data, then parity, stop
  logic [DATA_BITS-1:0] data_q;
  logic                 par_q, serr_q;
  samples_t             epat_q;
  logic                 bit_val, bit_err;
  logic [4:0]           ones_unused;
  logic [IDX_W-1:0]     par_idx, stop_idx;

  assign samp_full = {rx_i, samp_q[OVERSAMPLE-1:1]};
  assign par_idx   = IDX_W'(DATA_BITS + 1);
  assign stop_idx  = parity_en_i ? IDX_W'(DATA_BITS + 2) : IDX_W'(DATA_BITS + 1);

  euart_sample_eval u_eval (
    .samples_i  (samp_full),
    .mode_i     (os_mode_i),
    .threshold_i(threshold_i),
    .bit_o      (bit_val),
    .err_o      (bit_err),
    .ones_o     (ones_unused)
  );

  assign baud_restart_o = (state_q == RX_IDLE) && en_i && rx_fall_i;
  assign busy_o         = (state_q == RX_RECV);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q       <= RX_IDLE;
      samp_q        <= '0;
      scnt_q        <= '0;
      idx_q         <= '0;
      data_q        <= '0;
      par_q         <= 1'b0;
      serr_q        <= 1'b0;
      epat_q        <= '0;
      frame_valid_o <= 1'b0;
      frame_o       <= '0;
    end else begin
      frame_valid_o <= 1'b0;
      unique case (state_q)
        RX_IDLE: begin
          if (baud_restart_o) begin
            state_q <= RX_RECV;
            scnt_q  <= '0;
            idx_q   <= '0;
            serr_q  <= 1'b0;
          end
        end
        RX_RECV: begin
          if (!en_i) begin
            state_q <= RX_IDLE;
          end else if (tick_i) begin
            samp_q <= samp_full;
            scnt_q <= scnt_q + 1'b1;
            if (scnt_q == 4'(OVERSAMPLE - 1)) begin
              idx_q <= idx_q + 1'b1;
              if (bit_err) begin
                serr_q <= 1'b1;
                epat_q <= samp_full;
              end
              if (idx_q == '0) begin
                if (bit_val) state_q <= RX_IDLE;         // false start
              end else if (idx_q <= IDX_W'(DATA_BITS)) begin
                data_q <= {bit_val, data_q[DATA_BITS-1:1]};
              end else if (idx_q == par_idx && parity_en_i) begin
                par_q <= bit_val;
              end
              if (idx_q == stop_idx) begin
                state_q                <= RX_IDLE;
                frame_valid_o          <= 1'b1;
                frame_o.data           <= data_q;
                frame_o.parity_bit     <= par_q;
                frame_o.stop_bit       <= bit_val;
                frame_o.sample_err     <= serr_q | bit_err;
                frame_o.err_pattern    <= bit_err ? samp_full : epat_q;
              end
            end
          end
        end
        default: state_q <= RX_IDLE;
      endcase
    end
  end

endmodule
