// tb_euart_baudgen: self-checking test of the fractional tick generator.
// For several bit periods (integer and fractional, in Q12.4) it counts the
// ticks over a whole number of bit periods and compares with 16 ticks per
// bit, checks that tick spacing never differs from the ideal P/16 by a
// clock cycle or more, and checks the two restart alignments: with
// RESTART_HALF clear the 16th tick after a restart falls exactly one bit
// period later, with RESTART_HALF set the first tick falls half a sample
// period after the restart.
module tb_euart_baudgen;
  import euart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, restart = 1'b0;
  brs_t brs = brs_t'(800);
  logic tick_h, tick_z;
  int checks = 0, failures = 0;

  euart_baudgen #(.RESTART_HALF(1'b1)) dut_h (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .restart_i(restart), .brs_i(brs), .tick_o(tick_h));
  euart_baudgen #(.RESTART_HALF(1'b0)) dut_z (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .restart_i(restart), .brs_i(brs), .tick_o(tick_z));

  always #1 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Run 'bits' bit periods of brs_q4 (Q12.4) after a restart and count.
  task automatic run(input int brs_q4, input int bits);
    int cyc, nt_h, nt_z, last, first_h, t16_z;
    int total_cycles;
    real ideal;
    brs = brs_t'(brs_q4);
    restart = 1'b1;
    @(posedge clk); #0.1;
    restart = 1'b0;
    #0.1;
    // whole number of cycles covering 'bits' bit periods (bits*brs/16 exact)
    total_cycles = bits * brs_q4 / 16;
    nt_h = 0; nt_z = 0; last = 0; first_h = -1; t16_z = -1;
    ideal = real'(brs_q4) / 256.0;
    for (cyc = 1; cyc <= total_cycles; cyc++) begin
      if (tick_h) begin
        nt_h++;
        if (first_h < 0) first_h = cyc;
      end
      if (tick_z) begin
        nt_z++;
        if (nt_z == 16) t16_z = cyc;
        if (nt_z > 1) begin
          checks++;
          if ((cyc - last) < ideal - 1.0 || (cyc - last) > ideal + 1.0) begin
            failures++;
            $display("FAIL: spacing %0d vs %f", cyc - last, ideal);
          end
        end
        last = cyc;
      end
      @(posedge clk); #0.1;
    end
    check(nt_z == bits * 16, $sformatf("brs=%0d: %0d ticks, want %0d", brs_q4, nt_z, bits*16));
    check(nt_h == bits * 16, $sformatf("brs=%0d: half-aligned %0d ticks, want %0d", brs_q4, nt_h, bits*16));
    if (brs_q4 % 16 == 0)
      check(t16_z == brs_q4 / 16, $sformatf("16th tick at %0d, want %0d", t16_z, brs_q4/16));
    check(first_h >= int'(ideal / 2.0) && first_h <= int'(ideal / 2.0) + 1,
          $sformatf("first half-aligned tick at %0d, ideal %f", first_h, ideal/2.0));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1; en = 1'b1;
    run(800, 4);        // 50 cycles per bit (1 MHz, 20 kbaud)
    run(808, 8);        // 50.5 cycles per bit
    run(256, 8);        // 16 cycles per bit: one tick every cycle
    run(16*37 + 5, 16); // 37.3125 cycles per bit
    run(1000, 4);       // 62.5 cycles per bit
    // a disabled generator is silent
    en = 1'b0;
    repeat (100) begin
      @(posedge clk); #0.1;
      check(!tick_z && !tick_h, "tick while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
