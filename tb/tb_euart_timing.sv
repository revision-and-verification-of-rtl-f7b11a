// tb_euart_timing: self-checking test of the bit-cell time base.
// At 50 cycles per bit the timer must advance exactly every 50 cycles after
// a resynchronisation, which sets it to 0; a software write loads it; the
// time mark pulses once, in the cycle the timer takes the mark value, and
// at 37.5 cycles per bit 8 bit cells take exactly 300 cycles.
module tb_euart_timing;
  import euart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  brs_t brs = brs_t'(800);
  logic resync = 1'b0, we = 1'b0;
  reg_t wdata = '0, mark = 16'd5, timer;
  logic mark_evt;
  int checks = 0, failures = 0;
  int nmarks = 0;

  euart_timing dut (.clk_i(clk), .rst_ni(rst_n), .brs_i(brs), .resync_i(resync),
                    .timer_we_i(we), .timer_wdata_i(wdata), .mark_i(mark),
                    .timer_o(timer), .mark_o(mark_evt));

  always #1 clk = ~clk;
  always @(posedge clk) if (mark_evt) nmarks++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int c;
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    repeat (17) @(posedge clk); #0.1;
    resync = 1'b1; @(posedge clk); #0.1; resync = 1'b0;
    check(timer == 0, "resync clears the timer");
    // timer value k must hold on cycles [50k, 50k+49] after the resync
    for (c = 0; c < 50 * 8; c++) begin
      check(timer == reg_t'(c / 50), $sformatf("cycle %0d: timer %0d", c, timer));
      check(mark_evt == (c == 5 * 50), $sformatf("mark=%0d at cycle %0d", mark_evt, c));
      @(posedge clk); #0.1;
    end
    check(nmarks == 1, $sformatf("%0d marks", nmarks));
    // software write
    wdata = 16'd1000; we = 1'b1; @(posedge clk); #0.1; we = 1'b0;
    check(timer == 16'd1000, "timer write");
    repeat (50) @(posedge clk); #0.1;
    check(timer == 16'd1001, "timer runs on after write");
    // fractional period: 37.5 cycles
    brs = brs_t'(600);
    resync = 1'b1; @(posedge clk); #0.1; resync = 1'b0;
    repeat (299) @(posedge clk); #0.1;
    check(timer == 16'd7, $sformatf("before 300 cycles: %0d", timer));
    @(posedge clk); #0.1;
    check(timer == 16'd8, $sformatf("after 300 cycles: %0d", timer));
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
