// euart_busdriver: connection between the eUART and the single-wire bus.
//
// Receive side: the asynchronous bus line is brought into the clock domain
// by a two-flop synchroniser and then passed through a digital filter. The
// filter changes its output only after FILTER_LEN consecutive synchronised
// samples agree on the new level, so any disturbance lasting at most
// FILTER_LEN-1 clock ticks never reaches the receiver. The document requires
// that disturbances of up to 2 clock ticks are filtered here; how the filter
// works (a run-length check) is this design's choice.
// Transmit side: the bit chosen by the transmitter is registered and driven
// out; an idle transmitter drives the recessive high level.
//
// Timing: a clean level change appears on rx_o 3 + FILTER_LEN cycles after
// it arrives on rxd_i (2 synchroniser stages, FILTER_LEN history stages, 1
// output register); rx_fall_o and rx_edge_o are
// one-cycle pulses in the cycle rx_o changes.
module euart_busdriver #(
  parameter int unsigned FILTER_LEN = 3
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic rxd_i,       // bus line, asynchronous
  output logic txd_o,       // bus drive (1 = recessive)
  input  logic tx_bit_i,    // bit the transmitter wants on the bus
  output logic rx_o,        // synchronised, filtered bus level
  output logic rx_edge_o,   // rx_o changed this cycle
  output logic rx_fall_o    // rx_o went from 1 to 0 this cycle
);

  logic [1:0]            sync_q;
  logic [FILTER_LEN-1:0] hist_q;
  logic                  filt_q, filt_prev_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sync_q      <= '1;
      hist_q      <= '1;
      filt_q      <= 1'b1;
      filt_prev_q <= 1'b1;
      txd_o       <= 1'b1;
    end else begin
      sync_q      <= {sync_q[0], rxd_i};
      hist_q      <= {hist_q[FILTER_LEN-2:0], sync_q[1]};
      filt_prev_q <= filt_q;
      if (&hist_q)      filt_q <= 1'b1;
      else if (~|hist_q) filt_q <= 1'b0;
      txd_o       <= tx_bit_i;
    end
  end

  assign rx_o      = filt_q;
  assign rx_edge_o = filt_q ^ filt_prev_q;
  assign rx_fall_o = filt_prev_q & ~filt_q;

endmodule
