// euart_timing: bit-cell time base for time-triggered operation.
//
// The timer counts bit cells. Its own tick generator runs at the bit period
// of the EUBRS register; every 16 ticks the timer advances by one. A
// completed synchronisation (resync_i) restarts the time base, so the timer
// reads 0 at the last edge of the synchronisation pattern and bit-cell
// boundaries of the network fall on timer increments. Software may also
// write the timer. When the timer advances to the value of the time mark
// register (TS/TM), mark_o pulses for one cycle, the first cycle in which
// timer_o shows the new value; the control unit uses it
// to start a pending transmission at that exact instant and to raise the
// time-mark status flag.
//
// The document names the TIMING block and the TIMER and TS/TM registers
// and says the eUART removes send jitter; counting in bit cells and
// triggering transmissions from the time mark are this design's reading.
module euart_timing
  import euart_pkg::*;
#(
  parameter int unsigned TIMER_W = REG_W
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  brs_t               brs_i,
  input  logic               resync_i,
  input  logic               timer_we_i,
  input  logic [TIMER_W-1:0] timer_wdata_i,
  input  logic [TIMER_W-1:0] mark_i,
  output logic [TIMER_W-1:0] timer_o,
  output logic               mark_o
);

  logic       tick;
  logic [3:0] scnt_q;
  logic       restart;

  assign restart = resync_i || timer_we_i;

  euart_baudgen #(.RESTART_HALF(1'b0)) u_gen (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .en_i     (1'b1),
    .restart_i(restart),
    .brs_i    (brs_i),
    .tick_o   (tick)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      scnt_q  <= '0;
      timer_o <= '0;
      mark_o  <= 1'b0;
    end else begin
      mark_o <= 1'b0;
      if (restart) begin
        scnt_q  <= '0;
        timer_o <= resync_i ? '0 : timer_wdata_i;
      end else if (tick) begin
        scnt_q <= scnt_q + 1'b1;
        if (scnt_q == 4'(OVERSAMPLE - 1)) begin
          timer_o <= timer_o + 1'b1;
          mark_o  <= (timer_o + 1'b1) == mark_i;
        end
      end
    end
  end

endmodule
