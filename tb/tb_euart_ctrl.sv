// tb_euart_ctrl: self-checking test of the control unit and register file.
// Through the memory interface it writes and reads back the configuration
// registers, checks EUBRS's reset value, starts and stops a synchronisation
// search and lets a completed search load EUBRS and set SYNCED, sends with
// SEND and with SEND_MARK (started only by the time mark), feeds error
// reports and checks the sticky flags, write-1-to-clear, RX_FULL cleared by
// reading MESSAGE, OVERRUN, the COMMAND read of the sample pattern and the
// interrupt mask.
module tb_euart_ctrl;
  import euart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel = 1'b0, we = 1'b0;
  reg_addr_e addr = ADDR_STATUS;
  reg_t wdata = '0, rdata;
  logic irq;
  econfig_t econf;
  brs_t brs, sync_brs = '0;
  reg_t mark, timer_wdata, timer_in = 16'h1234;
  logic timer_we, sync_en, resync, sync_done = 1'b0;
  logic tx_start, tx_busy = 1'b0, tx_done = 1'b0, mark_evt = 1'b0;
  logic [7:0] tx_data, rx_data = '0;
  logic report = 1'b0, perr = 1'b0, ferr = 1'b0, serr = 1'b0, berr = 1'b0, diag = 1'b0;
  samples_t pat = 16'hBEEF;
  int checks = 0, failures = 0;
  int nstarts = 0;

  euart_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n), .sel_i(sel), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .rdata_o(rdata), .irq_o(irq), .econfig_o(econf), .brs_o(brs),
    .mark_o(mark), .timer_we_o(timer_we), .timer_wdata_o(timer_wdata),
    .timer_i(timer_in), .sync_en_o(sync_en), .resync_o(resync),
    .sync_done_i(sync_done), .sync_brs_i(sync_brs), .tx_start_o(tx_start),
    .tx_data_o(tx_data), .tx_busy_i(tx_busy), .tx_done_i(tx_done),
    .mark_i(mark_evt), .report_i(report), .rx_data_i(rx_data),
    .parity_err_i(perr), .frame_err_i(ferr), .sample_err_i(serr),
    .bit_err_i(berr), .diag_timing_i(diag), .pattern_i(pat));

  always #1 clk = ~clk;
  always @(posedge clk) if (tx_start) nstarts++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input reg_addr_e a, input reg_t d);
    sel = 1'b1; we = 1'b1; addr = a; wdata = d;
    @(posedge clk); #0.1;
    sel = 1'b0; we = 1'b0;
  endtask

  task automatic rd(input reg_addr_e a, output reg_t d);
    sel = 1'b1; we = 1'b0; addr = a;
    #0.1 d = rdata;
    @(posedge clk); #0.1;
    sel = 1'b0;
  endtask

  task automatic pulse(ref logic s);
    s = 1'b1; @(posedge clk); #0.1; s = 1'b0;
  endtask

  initial begin
    reg_t v;
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    @(posedge clk); #0.1;
    rd(ADDR_EUBRS, v);  check(v == 16'd800, "EUBRS reset value 50.0 cycles");
    rd(ADDR_STATUS, v); check(v == '0, "STATUS after reset");
    // configuration registers
    wr(ADDR_ECONFIG, 16'h01A5); rd(ADDR_ECONFIG, v);
    check(v == 16'h01A5 && econf.parity == PAR_EVEN && econf.os_mode == OS_ROBUST &&
          econf.threshold == 5'd13, "EUART CONFIG fields");
    wr(ADDR_TSTM, 16'd77); rd(ADDR_TSTM, v); check(v == 16'd77 && mark == 16'd77, "TS/TM");
    wr(ADDR_EUBRS, 16'd1000); rd(ADDR_EUBRS, v); check(v == 16'd1000 && brs == 16'd1000, "EUBRS write");
    rd(ADDR_TIMER, v); check(v == 16'h1234, "TIMER read");
    sel = 1'b1; we = 1'b1; addr = ADDR_TIMER; wdata = 16'd9; #0.1;
    check(timer_we && timer_wdata == 16'd9, "TIMER write strobe");
    @(posedge clk); #0.1; sel = 1'b0; we = 1'b0;
    rd(ADDR_COMMAND, v); check(v == 16'hBEEF, "COMMAND reads the sample pattern");
    // synchronisation
    wr(ADDR_COMMAND, 16'(1 << CMD_SYNC));
    check(sync_en, "SYNC starts search");
    rd(ADDR_STATUS, v); check(v[ST_SYNC_ACTIVE] && !v[ST_SYNCED], "status while searching");
    wr(ADDR_COMMAND, 16'(1 << CMD_SYNC_STOP));
    check(!sync_en, "SYNC_STOP ends search");
    wr(ADDR_COMMAND, 16'(1 << CMD_SYNC));
    sync_brs = 16'd777;
    sync_done = 1'b1; #0.1 check(resync, "resync strobe"); @(posedge clk); #0.1; sync_done = 1'b0;
    check(!sync_en && brs == 16'd777, "search end loads EUBRS");
    rd(ADDR_STATUS, v); check(v[ST_SYNCED] && !v[ST_SYNC_ACTIVE], "SYNCED");
    // send now
    wr(ADDR_MESSAGE, 16'h00C3); check(tx_data == 8'hC3, "MESSAGE write");
    nstarts = 0;
    wr(ADDR_COMMAND, 16'(1 << CMD_SEND));
    check(nstarts == 1, "SEND starts transmitter");
    // send at mark
    wr(ADDR_COMMAND, 16'(1 << CMD_SEND_MARK));
    repeat (10) @(posedge clk); #0.1;
    check(nstarts == 1, "SEND_MARK waits for the mark");
    rd(ADDR_STATUS, v); check(v[ST_SEND_PEND], "send pending");
    mark_evt = 1'b1; #0.1 check(tx_start, "mark starts transmitter");
    @(posedge clk); #0.1; mark_evt = 1'b0;
    rd(ADDR_STATUS, v); check(!v[ST_SEND_PEND] && v[ST_TIME_MARK], "mark flag, pending cleared");
    tx_busy = 1'b1;
    wr(ADDR_COMMAND, 16'(1 << CMD_SEND)); check(nstarts == 2, "no start while busy");
    rd(ADDR_STATUS, v); check(v[ST_TX_BUSY], "TX_BUSY");
    tx_busy = 1'b0; pulse(tx_done);
    rd(ADDR_STATUS, v); check(v[ST_TX_DONE], "TX_DONE");
    // received frames and errors
    rx_data = 8'h4B; perr = 1'b1; serr = 1'b1; diag = 1'b1; pulse(report);
    perr = 1'b0; serr = 1'b0;
    rd(ADDR_STATUS, v);
    check(v[ST_RX_FULL] && v[ST_PARITY_ERR] && v[ST_SAMPLE_ERR] && v[ST_DIAG_TIMING] &&
          !v[ST_FRAME_ERR] && !v[ST_BIT_ERR] && !v[ST_OVERRUN], "flags after report");
    rx_data = 8'h4C; ferr = 1'b1; berr = 1'b1; pulse(report); ferr = 1'b0; berr = 1'b0;
    rd(ADDR_STATUS, v); check(v[ST_OVERRUN] && v[ST_FRAME_ERR] && v[ST_BIT_ERR], "overrun and errors");
    rd(ADDR_MESSAGE, v); check(v == 16'h004C, "MESSAGE read");
    rd(ADDR_STATUS, v); check(!v[ST_RX_FULL], "reading MESSAGE clears RX_FULL");
    // write 1 to clear
    wr(ADDR_STATUS, 16'(1 << ST_PARITY_ERR));
    rd(ADDR_STATUS, v); check(!v[ST_PARITY_ERR] && v[ST_FRAME_ERR], "W1C one flag");
    // interrupt mask
    check(!irq, "no interrupt while masked");
    wr(ADDR_CONFIG, 16'(1 << ST_FRAME_ERR)); check(irq, "interrupt when enabled");
    wr(ADDR_STATUS, 16'hFFFF); check(!irq, "interrupt cleared with its flag");
    rd(ADDR_STATUS, v); check((v & 16'h0BF1) == '0, "all sticky flags cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
