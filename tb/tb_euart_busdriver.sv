// tb_euart_busdriver: self-checking test of the bus driver.
// Drives the bus line with glitches of 1 and 2 clock cycles, which must not
// pass the filter, and with clean level changes, which must appear on rx_o
// exactly 3 + FILTER_LEN cycles later with one-cycle edge pulses. Also
// checks that the transmit bit reaches txd_o one cycle after it is set.
module tb_euart_busdriver;
  localparam int unsigned FL = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rxd = 1'b1, tx_bit = 1'b1;
  logic txd, rx, rx_edge, rx_fall;
  int checks = 0, failures = 0;
  int edges = 0, falls = 0;

  euart_busdriver #(.FILTER_LEN(FL)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rxd_i(rxd), .txd_o(txd), .tx_bit_i(tx_bit),
    .rx_o(rx), .rx_edge_o(rx_edge), .rx_fall_o(rx_fall)
  );

  always #1 clk = ~clk;

  always @(posedge clk) begin
    if (rx_edge) edges++;
    if (rx_fall) falls++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Hold rxd at lvl for n cycles, checking that rx_o stays at keep.
  task automatic hold(input logic lvl, input int n, input logic keep);
    rxd = lvl;
    repeat (n) begin
      @(posedge clk); #0.1;
      check(rx == keep, $sformatf("rx changed during glitch, lvl=%0d", lvl));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    #0.5;
    edges = 0;
    falls = 0;
    // glitches of 1 and 2 cycles on an idle-high line
    for (int g = 1; g <= FL - 1; g++) begin
      hold(1'b0, g, 1'b1);
      hold(1'b1, 10, 1'b1);
    end
    check(edges == 0, "glitch produced an edge");
    // clean falling edge: latency 2 + FL cycles
    rxd = 1'b0;
    begin
      int lat = 0;
      while (rx !== 1'b0 && lat < 20) begin
        @(posedge clk); #0.1; lat++;
      end
      check(lat == 3 + FL, $sformatf("fall latency %0d", lat));
    end
    check(falls == 0 || falls == 1, "fall count");
    // glitches of 1 and 2 cycles on a low line
    #0.4;
    for (int g = 1; g <= FL - 1; g++) begin
      hold(1'b1, g, 1'b0);
      hold(1'b0, 10, 1'b0);
    end
    rxd = 1'b1;
    repeat (3 + FL + 1) @(posedge clk);
    #0.1;
    check(rx == 1'b1, "rise did not pass");
    check(edges == 2 && falls == 1, $sformatf("edges=%0d falls=%0d", edges, falls));
    // 3-cycle pulse passes
    rxd = 1'b0; repeat (FL) @(posedge clk); #0.1 rxd = 1'b1;
    repeat (FL + 6) @(posedge clk);
    check(edges == 4 && falls == 2, $sformatf("3-cycle pulse must pass: edges=%0d falls=%0d", edges, falls));
    // transmit path
    tx_bit = 1'b0; @(posedge clk); #0.1;
    check(txd == 1'b0, "txd follows tx_bit");
    tx_bit = 1'b1; @(posedge clk); #0.1;
    check(txd == 1'b1, "txd returns high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
