// tb_euart_tx: self-checking test of the transmitter.
// With its tick generator at 50 cycles per bit, frames of random bytes are
// sent with no, even and odd parity. The testbench decodes the line by
// timing: the start bit must begin in the cycle after start_i, every bit
// must last exactly 50 cycles, and the bits must be start, data LSB first,
// parity, stop. It also checks done_o, that a start request while busy is
// ignored, and that at 50.5 cycles per bit an 11-bit frame lasts 555 or 556
// cycles.
module tb_euart_tx;
  import euart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0] data = '0;
  parity_e par = PAR_NONE;
  brs_t brs = brs_t'(800);
  logic tick, restart, txb, busy, done;
  int checks = 0, failures = 0;

  euart_baudgen #(.RESTART_HALF(1'b0)) u_gen (
    .clk_i(clk), .rst_ni(rst_n), .en_i(1'b1), .restart_i(restart),
    .brs_i(brs), .tick_o(tick));
  euart_tx dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .data_i(data), .parity_i(par),
    .tick_i(tick), .baud_restart_o(restart), .tx_bit_o(txb), .busy_o(busy),
    .done_o(done));

  always #1 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Request a frame and record the line level for every cycle until done.
  task automatic send_and_capture(output logic line[$], output int done_at);
    line = {};
    done_at = -1;
    start = 1'b1;
    @(posedge clk); #0.1;
    start = 1'b0;
    for (int c = 0; c < 800; c++) begin
      line.push_back(txb);
      if (c == 100) begin
        start = 1'b1;                 // must be ignored while busy
      end
      if (done && done_at < 0) done_at = c;
      @(posedge clk); #0.1;
      start = 1'b0;
    end
  endtask

  initial begin
    logic line[$];
    logic exp_bits[$];
    int done_at, nb;
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    repeat (10) @(posedge clk); #0.1;
    for (int t = 0; t < 12; t++) begin
      par  = parity_e'(t % 3);
      data = 8'($urandom);
      exp_bits = {1'b0};
      for (int i = 0; i < 8; i++) exp_bits.push_back(data[i]);
      if (par == PAR_EVEN) exp_bits.push_back(^data);
      if (par == PAR_ODD)  exp_bits.push_back(~^data);
      exp_bits.push_back(1'b1);
      nb = exp_bits.size();
      send_and_capture(line, done_at);
      for (int b = 0; b < nb; b++) begin
        bit ok = 1'b1;
        for (int c = 0; c < 50; c++) if (line[b*50 + c] !== exp_bits[b]) ok = 1'b0;
        check(ok, $sformatf("frame %0d bit %0d (par %0d, data %h)", t, b, par, data));
      end
      check(line[nb*50] == 1'b1, "line idle after frame");
      check(done_at == nb * 50 - 1 || done_at == nb * 50,
            $sformatf("done at %0d for %0d bits", done_at, nb));
      // no second frame from the start request made while busy
      begin
        bit idle = 1'b1;
        for (int c = nb*50; c < 800; c++) if (!line[c]) idle = 1'b0;
        check(idle, "start while busy was not ignored");
      end
    end
    // fractional period: 50.5 cycles per bit, 11 bits
    brs = brs_t'(808);
    par = PAR_EVEN;
    data = 8'h00;
    send_and_capture(line, done_at);
    check(done_at >= 554 && done_at <= 556, $sformatf("fractional frame done at %0d", done_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
