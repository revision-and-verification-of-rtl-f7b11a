// euart_baudgen: enhanced baud rate generator.
//
// Produces OVERSAMPLE (16) sample ticks per bit cell. The bit period is
// given as brs_i, a fixed-point number of clock cycles with BRS_FRAC (4)
// fractional bits, so a bit rate that is not an integer divisor of the clock
// is met on average instead of being rounded to whole cycles. Every cycle
// the accumulator grows by OVERSAMPLE << BRS_FRAC; when it reaches brs_i a
// tick is issued and brs_i is subtracted. The spacing of ticks therefore
// jitters by at most one clock cycle while 16 ticks always take exactly the
// programmed bit period, averaged over the bit.
// restart_i re-aligns the generator. With RESTART_HALF set it loads the
// accumulator with half the bit period, so that the next tick comes half a
// sample period later and the 16 ticks of each following bit cell sit at
// (k + 1/2)/16 of the cell, never on a cell boundary; the receiver uses this
// to align on a start edge. With RESTART_HALF clear it loads zero, so that
// 16 ticks after the restart exactly one bit period has passed; the
// transmitter and the time base use this.
//
// The document names this block and says it reduces the arithmetic error of
// the baud rate setting; the fractional accumulator is this design's choice.
// brs_i must be at least OVERSAMPLE << BRS_FRAC (16 clock cycles per bit);
// smaller values are treated as that minimum.
module euart_baudgen
  import euart_pkg::*;
#(
  parameter bit RESTART_HALF = 1'b1
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic en_i,
  input  logic restart_i,
  input  brs_t brs_i,
  output logic tick_o
);

  localparam int unsigned STEP = OVERSAMPLE << BRS_FRAC;   // 256
  localparam int unsigned ACC_W = BRS_W + 1;

  logic [ACC_W-1:0] acc_q, acc_next, period;

  always_comb begin
    period = (ACC_W'(brs_i) < ACC_W'(STEP)) ? ACC_W'(STEP) : ACC_W'(brs_i);
    acc_next = acc_q + ACC_W'(STEP);
    tick_o = 1'b0;
    if (acc_next >= period) begin
      tick_o   = en_i && !restart_i;
      acc_next = acc_next - period;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        acc_q <= '0;
    else if (restart_i) acc_q <= RESTART_HALF ? (period >> 1) : '0;
    else if (!en_i)     acc_q <= '0;
    else                acc_q <= acc_next;
  end

endmodule
