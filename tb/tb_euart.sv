// tb_euart: end-to-end test of the eUART at its default parameters.
//
// A master node modelled in the testbench shares a wired-AND bus with the
// eUART; the processor side is driven through the memory interface. The
// master runs at 37.25 clock cycles per bit, while the eUART starts at its
// reset setting of 50, so nothing works until the eUART has synchronised.
// The run:
//   1. frames before synchronisation, then a SYNC command while the master
//      keeps sending ordinary data; only the synchronisation pattern (0x55,
//      odd parity) completes the search, and EUBRS must then hold 37.25
//      cycles (596 in Q12.4) within 1 %;
//   2. random data frames with even parity, read through MESSAGE after the
//      receive interrupt;
//   3. transmissions by the eUART (SEND), decoded by the master, and read
//      back by the eUART without a bit error; a transmission the master
//      overwrites with a dominant 0 gives a bit error;
//   4. two SEND_MARK transmissions, whose start bits must follow their time
//      marks by the same number of cycles (no send jitter), and which must
//      start a whole number of bit cells after synchronisation;
//   5. glitches of 1 and 2 cycles on the idle bus (filtered, no frame);
//   6. short bursts inside a bit: corrected in majority mode, a sampling
//      error diagnosed as noise in robust mode;
//   7. a master running 12 % fast: sampling errors diagnosed as a timing
//      failure;
//   8. a parity error, a framing error and an overrun;
//   9. a second synchronisation to a new bit rate (45.5 cycles).
// Every mechanism is counted and must occur at least once.
module tb_euart;
  import euart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel = 1'b0, we = 1'b0;
  reg_addr_e addr = ADDR_STATUS;
  reg_t wdata = '0, rdata;
  logic irq, txd;
  logic mdrv = 1'b1;              // master's drive
  logic bus;
  int checks = 0, failures = 0;
  int cyc = 0;
  int mq4 = 37 * 16 + 4;          // master bit period, Q12.4 (37.25)

  // mechanism counters
  int n_sync = 0, n_rx = 0, n_tx = 0, n_readback = 0, n_collision = 0;
  int n_timed = 0, n_glitch = 0, n_noise_fix = 0, n_noise_diag = 0;
  int n_timing_diag = 0, n_parity = 0, n_frame = 0, n_overrun = 0, n_irq = 0;
  int n_resync = 0;

  assign bus = mdrv & txd;

  euart dut (.clk_i(clk), .rst_ni(rst_n), .sel_i(sel), .we_i(we), .addr_i(addr),
             .wdata_i(wdata), .rdata_o(rdata), .irq_o(irq), .rxd_i(bus), .txd_o(txd));

  always #1 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- processor side ----------------
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

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #0.1;
  endtask

  // ---------------- master node ----------------
  // Frame bits: start, data LSB first, parity (if par != PAR_NONE), stop.
  function automatic void frame_bits(input logic [7:0] d, input parity_e par,
                                     input logic bad_par, input logic stopb,
                                     ref logic bits[$]);
    bits = {1'b0};
    for (int i = 0; i < 8; i++) bits.push_back(d[i]);
    if (par != PAR_NONE) bits.push_back(parity_bit_for(par, d) ^ bad_par);
    bits.push_back(stopb);
  endfunction

  // Drive a frame with bit period q4/16 cycles. burst_bit >= 0 inverts the
  // line for burst_len cycles, burst_n times, spread over that bit.
  task automatic msend(input logic [7:0] d, input parity_e par, input int q4,
                       input logic bad_par = 1'b0, input logic stopb = 1'b1,
                       input int burst_bit = -1, input int burst_len = 0,
                       input int burst_n = 0);
    logic bits[$];
    int t0;
    frame_bits(d, par, bad_par, stopb, bits);
    foreach (bits[b]) begin
      int len;
      len = ((b + 1) * q4) / 16 - (b * q4) / 16;
      for (int c = 0; c < len; c++) begin
        logic v;
        v = bits[b];
        if (b == burst_bit)
          for (int k = 0; k < burst_n; k++) begin
            int s;
            s = (len * (2 * k + 1)) / (2 * burst_n) - burst_len / 2;
            if (c >= s && c < s + burst_len) v = ~v;
          end
        mdrv = v;
        @(posedge clk); #0.1;
      end
    end
    mdrv = 1'b1;
    t0 = 0;
  endtask

  // Decode a frame from the bus at the master's rate; the caller is at or
  // before the start edge. Returns data, parity bit and stop bit.
  task automatic mrecv(output logic [7:0] d, output logic p, output logic s,
                       output int start_cyc);
    int limit;
    limit = 0;
    while (bus && limit < 20000) begin @(posedge clk); #0.1; limit++; end
    start_cyc = cyc;
    for (int b = 0; b < 11; b++) begin
      int mid;
      mid = (b * mq4 + mq4 / 2) / 16;
      while (cyc - start_cyc < mid) begin @(posedge clk); #0.1; end
      if (b >= 1 && b <= 8) d[b-1] = bus;
      if (b == 9) p = bus;
      if (b == 10) s = bus;
    end
  endtask

  // Wait for the receive flag (via the interrupt), read status and data.
  task automatic get_frame(output reg_t st, output reg_t msg);
    int limit;
    limit = 0;
    while (!irq && limit < 2000) begin @(posedge clk); #0.1; limit++; end
    if (irq) n_irq++;
    rd(ADDR_STATUS, st);
    rd(ADDR_MESSAGE, msg);
  endtask

  function automatic logic [7:0] plain_byte();
    logic [7:0] b;
    do b = 8'($urandom); while (b == 8'h55 || b == 8'hAA);
    return b;
  endfunction

  task automatic clear_status();
    reg_t v;
    wr(ADDR_STATUS, 16'hFFFF);
    rd(ADDR_MESSAGE, v);
  endtask

  initial begin
    reg_t st, msg, v;
    logic [7:0] d, rd_d;
    logic rp, rs;
    int sc, mark_at[2], start_at[2], sync_cyc;
    int resync_at;

    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    idle(10);
    wr(ADDR_ECONFIG, 16'(PAR_EVEN));                 // majority, even parity
    wr(ADDR_CONFIG, 16'(1 << ST_RX_FULL));           // interrupt on receive

    // ---- 1. synchronisation ----
    msend(8'h3C, PAR_EVEN, mq4);                     // at the wrong rate
    idle(100);
    clear_status();
    wr(ADDR_COMMAND, 16'(1 << CMD_SYNC));
    for (int i = 0; i < 4; i++) begin
      msend(plain_byte(), PAR_EVEN, mq4);
      idle(2 * mq4 / 16);                            // 13-cell slots
    end
    rd(ADDR_STATUS, st);
    check(st[ST_SYNC_ACTIVE] && !st[ST_SYNCED], "ordinary data must not synchronise");
    msend(8'h55, PAR_ODD, mq4);                      // synchronisation pattern
    idle(2 * mq4 / 16);
    rd(ADDR_STATUS, st);
    check(st[ST_SYNCED] && !st[ST_SYNC_ACTIVE], "synchronised on the pattern");
    rd(ADDR_EUBRS, v);
    check(v >= 590 && v <= 602, $sformatf("EUBRS %0d, want 596", v));
    if (st[ST_SYNCED]) n_sync++;
    clear_status();

    // ---- 2. reception ----
    for (int i = 0; i < 12; i++) begin
      d = plain_byte();
      msend(d, PAR_EVEN, mq4);
      get_frame(st, msg);
      check(st[ST_RX_FULL] && msg[7:0] == d, $sformatf("rx %h got %h", d, msg[7:0]));
      check((st & 16'h02F0) == '0, $sformatf("rx %h: error flags %h", d, st));
      if (st[ST_RX_FULL] && msg[7:0] == d) n_rx++;
      idle(2 * mq4 / 16);
    end
    clear_status();

    // ---- 3. transmission, read-back and collision ----
    for (int i = 0; i < 4; i++) begin
      d = 8'($urandom);
      wr(ADDR_MESSAGE, 16'(d));
      wr(ADDR_COMMAND, 16'(1 << CMD_SEND));
      mrecv(rd_d, rp, rs, sc);
      check(rd_d == d && rp == ^d && rs, $sformatf("tx %h decoded %h", d, rd_d));
      if (rd_d == d) n_tx++;
      get_frame(st, msg);
      check(msg[7:0] == d && !st[ST_BIT_ERR] && st[ST_TX_DONE], "own frame read back");
      if (msg[7:0] == d && !st[ST_BIT_ERR]) n_readback++;
      clear_status();
      idle(2 * mq4 / 16);
    end
    wr(ADDR_MESSAGE, 16'hFF);
    wr(ADDR_COMMAND, 16'(1 << CMD_SEND));
    idle(1);
    begin
      // master forces data bit 3 to the dominant 0
      int c0;
      c0 = cyc;
      while (cyc - c0 < (4 * mq4) / 16 + 2) begin @(posedge clk); #0.1; end
      mdrv = 1'b0;
      while (cyc - c0 < (5 * mq4) / 16 + 2) begin @(posedge clk); #0.1; end
      mdrv = 1'b1;
    end
    get_frame(st, msg);
    check(st[ST_BIT_ERR] && msg[7:0] == 8'hF7, $sformatf("collision: %h st %h", msg[7:0], st));
    if (st[ST_BIT_ERR]) n_collision++;
    idle(3 * mq4 / 16);
    clear_status();

    // ---- 4. time-triggered sending ----
    for (int i = 0; i < 2; i++) begin
      rd(ADDR_TIMER, v);
      wr(ADDR_TSTM, v + 16'd3);
      wr(ADDR_MESSAGE, 16'h0F);
      wr(ADDR_COMMAND, 16'(1 << CMD_SEND_MARK));
      while (!dut.u_timing.mark_o) begin @(posedge clk); #0.1; end
      mark_at[i] = cyc;
      mrecv(rd_d, rp, rs, sc);
      start_at[i] = sc;
      check(rd_d == 8'h0F, "timed frame data");
      get_frame(st, msg);
      clear_status();
      idle(5 * mq4 / 16);
    end
    check(start_at[0] - mark_at[0] == start_at[1] - mark_at[1],
          $sformatf("send jitter: %0d vs %0d", start_at[0] - mark_at[0], start_at[1] - mark_at[1]));
    // both marks lie a whole number of bit cells apart (within one cycle)
    begin
      real cells, frac;
      cells = real'(mark_at[1] - mark_at[0]) * 16.0 / real'(596);
      frac = cells - $floor(cells + 0.5);
      check(frac < 0.03 && frac > -0.03, $sformatf("marks %f cells apart", cells));
    end
    if (start_at[0] - mark_at[0] == start_at[1] - mark_at[1]) n_timed++;

    // ---- 5. glitches on the idle bus ----
    for (int g = 1; g <= 2; g++) begin
      repeat (5) begin
        mdrv = 1'b0; idle(g); mdrv = 1'b1; idle(40);
      end
    end
    idle(200);
    rd(ADDR_STATUS, st);
    check(!st[ST_RX_FULL] && !dut.u_rx.busy_o, "glitches must be filtered");
    if (!st[ST_RX_FULL]) n_glitch++;

    // ---- 6. noise inside a bit ----
    msend(8'h00, PAR_EVEN, mq4, 1'b0, 1'b1, 5, 4, 3);   // three 4-cycle bursts
    get_frame(st, msg);
    check(msg[7:0] == 8'h00 && !st[ST_SAMPLE_ERR], "noise corrected in majority mode");
    if (msg[7:0] == 8'h00 && !st[ST_SAMPLE_ERR]) n_noise_fix++;
    clear_status();
    idle(2 * mq4 / 16);
    wr(ADDR_ECONFIG, 16'(PAR_EVEN) | 16'(1 << 2) | 16'(14 << 5));   // robust, 14
    msend(8'h00, PAR_EVEN, mq4, 1'b0, 1'b1, 5, 4, 3);
    get_frame(st, msg);
    check(msg[7:0] == 8'h00 && st[ST_SAMPLE_ERR] && !st[ST_DIAG_TIMING],
          $sformatf("noise flagged in robust mode, st %h", st));
    rd(ADDR_COMMAND, v);
    check($countones(v ^ (v >> 1)) > 1, $sformatf("noisy pattern %h", v));
    if (st[ST_SAMPLE_ERR] && !st[ST_DIAG_TIMING]) n_noise_diag++;
    clear_status();
    idle(2 * mq4 / 16);

    // ---- 7. lost synchronisation: master 12 % fast ----
    msend(8'h0F, PAR_EVEN, (mq4 * 88) / 100);
    get_frame(st, msg);
    check(st[ST_SAMPLE_ERR] && st[ST_DIAG_TIMING], $sformatf("timing failure, st %h", st));
    if (st[ST_SAMPLE_ERR] && st[ST_DIAG_TIMING]) n_timing_diag++;
    clear_status();
    wr(ADDR_ECONFIG, 16'(PAR_EVEN));
    idle(3 * mq4 / 16);

    // ---- 8. parity, framing, overrun ----
    msend(8'h21, PAR_EVEN, mq4, 1'b1);
    get_frame(st, msg);
    check(st[ST_PARITY_ERR] && !st[ST_FRAME_ERR], "parity error");
    if (st[ST_PARITY_ERR]) n_parity++;
    clear_status();
    idle(2 * mq4 / 16);
    msend(8'h21, PAR_EVEN, mq4, 1'b0, 1'b0);
    idle(3 * mq4 / 16);
    get_frame(st, msg);
    check(st[ST_FRAME_ERR] && !st[ST_PARITY_ERR], "framing error");
    if (st[ST_FRAME_ERR]) n_frame++;
    clear_status();
    idle(2 * mq4 / 16);
    msend(8'h11, PAR_EVEN, mq4); idle(2 * mq4 / 16);
    msend(8'h22, PAR_EVEN, mq4); idle(2 * mq4 / 16);
    rd(ADDR_STATUS, st);
    rd(ADDR_MESSAGE, msg);
    check(st[ST_OVERRUN] && msg[7:0] == 8'h22, "overrun keeps the newest byte");
    if (st[ST_OVERRUN]) n_overrun++;
    clear_status();

    // ---- 9. resynchronisation to a new rate ----
    mq4 = 45 * 16 + 8;
    wr(ADDR_COMMAND, 16'(1 << CMD_SYNC));
    msend(8'h55, PAR_ODD, mq4);
    idle(2 * mq4 / 16);
    rd(ADDR_EUBRS, v);
    check(v >= 720 && v <= 736, $sformatf("resync EUBRS %0d, want 728", v));
    rd(ADDR_STATUS, st);
    if (st[ST_SYNCED] && v >= 720 && v <= 736) n_resync++;
    clear_status();
    d = 8'hC6;
    msend(d, PAR_EVEN, mq4);
    get_frame(st, msg);
    check(msg[7:0] == d && (st & 16'h02F0) == '0,
          $sformatf("reception at the new rate: %h st %h", msg[7:0], st));

    // ---- mechanism coverage ----
    check(n_sync > 0, "mechanism: synchronisation");
    check(n_rx > 0, "mechanism: reception");
    check(n_tx > 0, "mechanism: transmission");
    check(n_readback > 0, "mechanism: read-back");
    check(n_collision > 0, "mechanism: collision / bit error");
    check(n_timed > 0, "mechanism: time-triggered send");
    check(n_glitch > 0, "mechanism: glitch filter");
    check(n_noise_fix > 0, "mechanism: noise corrected by oversampling");
    check(n_noise_diag > 0, "mechanism: sampling error diagnosed as noise");
    check(n_timing_diag > 0, "mechanism: sampling error diagnosed as timing failure");
    check(n_parity > 0, "mechanism: parity error");
    check(n_frame > 0, "mechanism: framing error");
    check(n_overrun > 0, "mechanism: overrun");
    check(n_irq > 0, "mechanism: interrupt");
    check(n_resync > 0, "mechanism: resynchronisation");
    $display("mechanisms: sync=%0d rx=%0d tx=%0d readback=%0d collision=%0d timed=%0d glitch=%0d noise_fix=%0d noise_diag=%0d timing_diag=%0d parity=%0d frame=%0d overrun=%0d irq=%0d resync=%0d",
             n_sync, n_rx, n_tx, n_readback, n_collision, n_timed, n_glitch, n_noise_fix,
             n_noise_diag, n_timing_diag, n_parity, n_frame, n_overrun, n_irq, n_resync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
