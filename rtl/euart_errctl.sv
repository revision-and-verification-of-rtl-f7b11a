// euart_errctl: error control.
//
// Judges every frame the receiver delivers and reports it, one cycle
// later, as a one-cycle report_o pulse with these flags:
//   parity_err_o  parity bit does not match the data (if parity is on),
//   frame_err_o   stop bit was 0,
//   sample_err_o  at least one bit cell failed the oversampling evaluation,
//   bit_err_o     the frame was this node's own transmission (the
//                 transmitter was busy when the frame's start edge came)
//                 and the data read back from the bus differ from the data
//                 sent, i.e. another node disturbed or collided with it,
//   diag_timing_o for a sampling error: the failing cell's 16 samples
//                 hold at most one level change (a clean edge inside the
//                 cell, as for a receiver that lost synchronisation) rather
//                 than several (a noisy channel).
// pattern_o keeps the samples of the last failing cell for software.
//
// Parity checking and the use of the last sample pattern to tell a timing
// failure from a noisy channel come from the document; the rule "at most
// one level change means timing failure", the read-back comparison and the
// report format are this design's choice.
module euart_errctl
  import euart_pkg::*;
(
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  parity_e              parity_i,
  input  logic                 rx_start_i,   // receiver began a frame
  input  logic                 tx_busy_i,
  input  logic [DATA_BITS-1:0] tx_data_i,    // data of the frame being sent
  input  logic                 frame_valid_i,
  input  rx_frame_t            frame_i,
  output logic                 report_o,
  output logic [DATA_BITS-1:0] data_o,
  output logic                 parity_err_o,
  output logic                 frame_err_o,
  output logic                 sample_err_o,
  output logic                 bit_err_o,
  output logic                 diag_timing_o,
  output samples_t             pattern_o
);

  logic                 own_q;
  logic [DATA_BITS-1:0] sent_q;
  logic                 par_bad;
  logic [4:0]           changes;
  samples_t             diff;

  always_comb begin
    par_bad = (parity_i != PAR_NONE) &&
              (frame_i.parity_bit != parity_bit_for(parity_i, frame_i.data));
    diff    = frame_i.err_pattern ^ (frame_i.err_pattern >> 1);
    changes = '0;
    for (int i = 0; i < OVERSAMPLE - 1; i++) changes += 5'(diff[i]);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      own_q         <= 1'b0;
      sent_q        <= '0;
      report_o      <= 1'b0;
      data_o        <= '0;
      parity_err_o  <= 1'b0;
      frame_err_o   <= 1'b0;
      sample_err_o  <= 1'b0;
      bit_err_o     <= 1'b0;
      diag_timing_o <= 1'b0;
      pattern_o     <= '0;
    end else begin
      report_o <= frame_valid_i;
      if (rx_start_i) begin
        own_q  <= tx_busy_i;
        sent_q <= tx_data_i;
      end
      if (frame_valid_i) begin
        data_o       <= frame_i.data;
        parity_err_o <= par_bad;
        frame_err_o  <= !frame_i.stop_bit;
        sample_err_o <= frame_i.sample_err;
        bit_err_o    <= own_q && (frame_i.data != sent_q);
        if (frame_i.sample_err) begin
          pattern_o     <= frame_i.err_pattern;
          diag_timing_o <= (changes <= 5'd1);
        end
      end
    end
  end

endmodule
