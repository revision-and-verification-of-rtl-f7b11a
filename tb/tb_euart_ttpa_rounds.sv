// tb_euart_ttpa_rounds: workload test, TTP/A rounds under clock deviation.
//
// Scenario: a TTP/A round of 13-cyc_cell time slots. Slot 0 holds the master's
// synchronisation frame (0x55, odd parity), slots 1..4 hold master data
// frames (even parity), and in slot 5 the eUART answers with a frame of its
// own, started by its time mark. The eUART's clock is nominally 1 MHz for
// 20 kbit/s (50 cycles per bit); an RC oscillator may be off by up to
// +/-50 %, so the rounds are played at 50, 25, 75, 33.3 and 61.7 cycles per
// bit, and the eUART is told to synchronise at the start of each round
// without knowing the rate. Per round the testbench checks the measured
// bit period (within 1 %), the four received bytes, and that the eUART's
// answer is correct and lies inside slot 5: it must start no earlier than
// the slot boundary and no later than one bit cyc_cell after it, so the 11-cyc_cell
// frame ends before the slot does.
module tb_euart_ttpa_rounds;
  import euart_pkg::*;
  localparam int SLOT = 13;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel = 1'b0, we = 1'b0;
  reg_addr_e addr = ADDR_STATUS;
  reg_t wdata = '0, rdata;
  logic irq, txd;
  logic mdrv = 1'b1;
  logic bus;
  int checks = 0, failures = 0;
  int cyc = 0;

  assign bus = mdrv & txd;

  euart dut (.clk_i(clk), .rst_ni(rst_n), .sel_i(sel), .we_i(we), .addr_i(addr),
             .wdata_i(wdata), .rdata_o(rdata), .irq_o(irq), .rxd_i(bus), .txd_o(txd));

  always #1 clk = ~clk;
  always @(posedge clk) cyc++;

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

  task automatic wait_until(input int c);
    while (cyc < c) begin @(posedge clk); #0.1; end
  endtask

  // Master drives frame d starting at cycle t0 with period q4/16.
  task automatic mframe(input int t0, input int q4, input logic [7:0] d,
                        input parity_e par);
    logic bits[$];
    bits = {1'b0};
    for (int i = 0; i < 8; i++) bits.push_back(d[i]);
    bits.push_back(parity_bit_for(par, d));
    bits.push_back(1'b1);
    foreach (bits[b]) begin
      wait_until(t0 + (b * q4) / 16);
      mdrv = bits[b];
    end
    wait_until(t0 + (11 * q4) / 16);
    mdrv = 1'b1;
  endtask

  // Processor side during the round: collects received bytes, runs in
  // parallel with the master.
  logic [7:0] got[$];
  bit collecting = 1'b0;
  initial forever begin
    @(posedge clk); #0.2;
    if (collecting && irq) begin
      reg_t m, s;
      rd(ADDR_MESSAGE, m);
      got.push_back(m[7:0]);
      wr(ADDR_STATUS, 16'hFFFF);
      rd(ADDR_STATUS, s);
    end
  end

  initial begin
    int rates[5] = '{800, 400, 1200, 533, 987};
    reg_t v;
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    repeat (10) @(posedge clk); #0.1;
    wr(ADDR_ECONFIG, 16'(PAR_EVEN));
    wr(ADDR_CONFIG, 16'(1 << ST_RX_FULL));
    foreach (rates[r]) begin
      int q4, t_round, t_slot5, fstart, cyc_cell;
      logic [7:0] sent[4];
      logic [7:0] answer, dec;
      q4 = rates[r];
      cyc_cell = q4 / 16;
      answer = 8'(8'h30 + r);
      // software: synchronise, answer in slot 5 (timer restarts 8 cells
      // into slot 0, at the end of the pattern)
      wr(ADDR_COMMAND, 16'(1 << CMD_SYNC));
      wr(ADDR_MESSAGE, 16'(answer));
      wr(ADDR_TSTM, 16'(5 * SLOT - 8));
      wr(ADDR_COMMAND, 16'(1 << CMD_SEND_MARK));
      got = {};
      t_round = cyc + 20;
      mframe(t_round, q4, 8'h55, PAR_ODD);
      wait_until(t_round + (SLOT * q4) / 16);
      rd(ADDR_EUBRS, v);
      check(int'(v) * 100 >= q4 * 99 && int'(v) * 100 <= q4 * 101,
            $sformatf("round %0d: EUBRS %0d, master %0d", r, v, q4));
      collecting = 1'b1;
      for (int s = 1; s <= 4; s++) begin
        sent[s-1] = 8'($urandom);
        mframe(t_round + (s * SLOT * q4) / 16, q4, sent[s-1], PAR_EVEN);
      end
      // slot 5: the eUART answers; decode it at the master's rate
      t_slot5 = t_round + (5 * SLOT * q4) / 16;
      wait_until(t_slot5 - cyc_cell);
      while (bus && cyc < t_slot5 + 3 * cyc_cell) begin @(posedge clk); #0.1; end
      fstart = cyc;
      for (int b = 1; b <= 8; b++) begin
        wait_until(fstart + (b * q4 + q4 / 2) / 16);
        dec[b-1] = bus;
      end
      wait_until(t_round + (6 * SLOT * q4) / 16);
      collecting = 1'b0;
      $display("INFO round %0d: %0d/16 cycles per bit, EUBRS %0d, answer %0d cycles into slot 5",
               r, q4, v, fstart - t_slot5);
      check(fstart >= t_slot5 && fstart <= t_slot5 + cyc_cell,
            $sformatf("round %0d: answer starts %0d cycles after slot 5 (cyc_cell %0d)",
                      r, fstart - t_slot5, cyc_cell));
      check(dec == answer, $sformatf("round %0d: answer %h decoded %h", r, answer, dec));
      check(got.size() == 5, $sformatf("round %0d: %0d frames received", r, got.size()));
      for (int s = 0; s < 4; s++)
        check(s < got.size() && got[s] == sent[s],
              $sformatf("round %0d slot %0d: sent %h", r, s + 1, sent[s]));
      check(got.size() == 5 && got[4] == answer, "own answer read back");
      rd(ADDR_STATUS, v);
      check((v & 16'h02F0) == '0, $sformatf("round %0d: error flags %h", r, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
