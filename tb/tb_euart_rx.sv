// tb_euart_rx: self-checking test of the oversampling receiver.
// The receiver runs with its own tick generator (bit period 50 cycles). The
// testbench plays frames on the filtered line: random bytes with and
// without parity, a false start (a short low pulse), a frame with a broken
// stop bit, frames with short disturbances (corrected in majority mode,
// flagged in robust mode with threshold 16), and a frame sent 10 % slow,
// whose late edges fall inside sampling windows and are flagged. Every
// frame is compared with the bits sent; the frame must be delivered within a few
// cycles of the end of the stop bit.
module tb_euart_rx;
  import euart_pkg::*;
  localparam int P = 50;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx = 1'b1, rx_prev = 1'b1, rx_fall;
  logic tick, restart, busy, fv;
  logic par_en = 1'b1;
  os_mode_e mode = OS_MAJORITY;
  logic [4:0] thr = 5'd16;
  rx_frame_t frame;
  int checks = 0, failures = 0;
  int nframes = 0;
  rx_frame_t got;

  euart_baudgen #(.RESTART_HALF(1'b1)) u_gen (
    .clk_i(clk), .rst_ni(rst_n), .en_i(busy), .restart_i(restart),
    .brs_i(brs_t'(P * 16)), .tick_o(tick));
  euart_rx dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(1'b1), .rx_i(rx), .rx_fall_i(rx_fall),
    .tick_i(tick), .parity_en_i(par_en), .os_mode_i(mode), .threshold_i(thr),
    .baud_restart_o(restart), .busy_o(busy), .frame_valid_o(fv), .frame_o(frame));

  always #1 clk = ~clk;
  always @(posedge clk) rx_prev <= rx;
  assign rx_fall = rx_prev && !rx;
  always @(posedge clk) if (fv) begin nframes++; got = frame; end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Send one frame; cyc_per_bit = cycles per bit; glitch_bit >= 0 puts a low/high
  // inversion of glitch_len cycles in the middle of that bit.
  task automatic send(input logic [7:0] d, input logic pbit, input logic stopb,
                      input int cyc_per_bit, input int glitch_bit, input int glitch_len);
    logic bits[$];
    bits = {1'b0};
    for (int i = 0; i < 8; i++) bits.push_back(d[i]);
    if (par_en) bits.push_back(pbit);
    bits.push_back(stopb);
    foreach (bits[i]) begin
      for (int c = 0; c < cyc_per_bit; c++) begin
        if (i == glitch_bit && c >= cyc_per_bit/2 - glitch_len/2 && c < cyc_per_bit/2 - glitch_len/2 + glitch_len)
          rx = ~bits[i];
        else
          rx = bits[i];
        @(posedge clk); #0.1;
      end
    end
    rx = 1'b1;
  endtask

  task automatic expect_frame(input int n_before, input logic [7:0] d, input logic pbit,
                              input logic stopb, input logic serr, input string name);
    repeat (4) @(posedge clk);
    #0.1;
    check(nframes == n_before + 1, $sformatf("%s: %0d frames", name, nframes - n_before));
    check(got.data == d, $sformatf("%s: data %h want %h", name, got.data, d));
    if (par_en) check(got.parity_bit == pbit, $sformatf("%s: parity bit", name));
    check(got.stop_bit == stopb, $sformatf("%s: stop bit", name));
    check(got.sample_err == serr, $sformatf("%s: sample_err %0d want %0d", name, got.sample_err, serr));
  endtask

  initial begin
    int n;
    logic [7:0] d;
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    repeat (20) @(posedge clk); #0.1;
    // random frames, parity on and off
    for (int t = 0; t < 16; t++) begin
      par_en = t[0];
      d = 8'($urandom);
      n = nframes;
      send(d, ^d, 1'b1, P, -1, 0);   // frame delivered before stop bit ends
      expect_frame(n, d, ^d, 1'b1, 1'b0, $sformatf("frame %0d", t));
      repeat ($urandom_range(0, 30)) @(posedge clk);
      #0.1;
    end
    par_en = 1'b1;
    // false start: low for a quarter bit only
    n = nframes;
    rx = 1'b0; repeat (P / 4) @(posedge clk); #0.1 rx = 1'b1;
    repeat (2 * P) @(posedge clk); #0.1;
    check(nframes == n && !busy, "false start must be dropped");
    // broken stop bit
    n = nframes;
    send(8'h3C, 1'b0, 1'b0, P, -1, 0);
    rx = 1'b1; repeat (P) @(posedge clk); #0.1;
    expect_frame(n, 8'h3C, 1'b0, 1'b0, 1'b0, "stop bit 0");
    // a disturbance of 1/8 bit in data bit 3 (index 4 counting start)
    mode = OS_MAJORITY;
    n = nframes;
    send(8'hA5, 1'b0, 1'b1, P, 4, P / 8);
    expect_frame(n, 8'hA5, 1'b0, 1'b1, 1'b0, "glitch, majority");
    repeat (5) @(posedge clk); #0.1;
    mode = OS_ROBUST; thr = 5'd16;
    n = nframes;
    send(8'hA5, 1'b0, 1'b1, P, 4, P / 8);
    expect_frame(n, 8'hA5, 1'b0, 1'b1, 1'b1, "glitch, robust 16");
    check(got.err_pattern != '1 && got.err_pattern != '0, "error pattern kept");
    repeat (5) @(posedge clk); #0.1;
    thr = 5'd12;
    n = nframes;
    send(8'hA5, 1'b0, 1'b1, P, 4, P / 8);
    expect_frame(n, 8'hA5, 1'b0, 1'b1, 1'b0, "glitch, robust 12");
    repeat (5) @(posedge clk); #0.1;
    // a disturbance longer than half a bit inverts the bit
    mode = OS_MAJORITY;
    n = nframes;
    send(8'h00, 1'b0, 1'b1, P, 2, (P * 3) / 4);
    expect_frame(n, 8'h02, 1'b0, 1'b1, 1'b0, "long burst");
    repeat (5) @(posedge clk); #0.1;
    // sender 10 % slow: later bit edges fall inside the sampling window
    mode = OS_ROBUST; thr = 5'd16;
    n = nframes;
    send(8'h55, 1'b0, 1'b1, P + P / 10, -1, 0);
    repeat (P) @(posedge clk); #0.1;
    check(nframes == n + 1 && got.sample_err, "slow sender must give a sampling error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
