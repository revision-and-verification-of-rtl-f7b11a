// euart_tx: UART transmitter.
//
// A pulse on start_i while idle loads the frame start bit (0), DATA_BITS
// data bits LSB first, a parity bit when parity is enabled, and a stop bit
// (1). The start bit appears on tx_bit_o in the cycle after start_i, and
// baud_restart_o re-aligns the transmitter's own tick generator in that same
// cycle, so a frame begins exactly when it is requested: with the timing
// unit issuing start_i at a time mark, the send instant has no jitter.
// Every bit is held for 16 sample ticks. done_o pulses when the stop bit has
// been sent; busy_o is high from start_i until then. An idle transmitter
// sends the recessive level 1.
//
// The document names the transmitter only; this frame format (which matches
// the receiver) and the start alignment are this design's choice.
module euart_tx
  import euart_pkg::*;
(
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 start_i,
  input  logic [DATA_BITS-1:0] data_i,
  input  parity_e              parity_i,
  input  logic                 tick_i,
  output logic                 baud_restart_o,
  output logic                 tx_bit_o,
  output logic                 busy_o,
  output logic                 done_o
);

  localparam int unsigned FRAME_MAX = DATA_BITS + 3;
  localparam int unsigned CNT_W     = $clog2(FRAME_MAX + 1);

  logic [FRAME_MAX-1:0] shift_q;
  logic [CNT_W-1:0]     left_q;     // bits still to send, current included
  logic [3:0]           scnt_q;
  logic                 par_en;

  assign par_en         = (parity_i != PAR_NONE);
  assign baud_restart_o = start_i && !busy_o;
  assign tx_bit_o       = busy_o ? shift_q[0] : 1'b1;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      shift_q <= '1;
      left_q  <= '0;
      scnt_q  <= '0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (baud_restart_o) begin
        busy_o <= 1'b1;
        scnt_q <= '0;
        if (par_en) begin
          shift_q <= {1'b1, parity_bit_for(parity_i, data_i), data_i, 1'b0};
          left_q  <= CNT_W'(DATA_BITS + 3);
        end else begin
          shift_q <= {1'b1, 1'b1, data_i, 1'b0};
          left_q  <= CNT_W'(DATA_BITS + 2);
        end
      end else if (busy_o && tick_i) begin
        scnt_q <= scnt_q + 1'b1;
        if (scnt_q == 4'(OVERSAMPLE - 1)) begin
          shift_q <= {1'b1, shift_q[FRAME_MAX-1:1]};
          left_q  <= left_q - 1'b1;
          if (left_q == CNT_W'(1)) begin
            busy_o <= 1'b0;
            done_o <= 1'b1;
          end
        end
      end
    end
  end

endmodule
