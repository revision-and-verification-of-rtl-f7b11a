// tb_euart_errctl: self-checking test of error control.
// Presents frames directly and checks the report one cycle later: parity
// errors for even and odd parity (and none without parity), framing errors,
// sampling errors with the diagnosis "timing failure" for a pattern with
// one level change (00000000 11111111) and "noise" for 01010101 01010101,
// and bit errors for own frames read back with different data, while a
// frame received when the transmitter was idle never gives a bit error.
module tb_euart_errctl;
  import euart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  parity_e par = PAR_EVEN;
  logic rx_start = 1'b0, tx_busy = 1'b0, fv = 1'b0;
  logic [7:0] tx_data = '0;
  rx_frame_t fr = '0;
  logic report, perr, ferr, serr, berr, diag;
  logic [7:0] dout;
  samples_t pat;
  int checks = 0, failures = 0;

  euart_errctl dut (
    .clk_i(clk), .rst_ni(rst_n), .parity_i(par), .rx_start_i(rx_start),
    .tx_busy_i(tx_busy), .tx_data_i(tx_data), .frame_valid_i(fv), .frame_i(fr),
    .report_o(report), .data_o(dout), .parity_err_o(perr), .frame_err_o(ferr),
    .sample_err_o(serr), .bit_err_o(berr), .diag_timing_o(diag), .pattern_o(pat));

  always #1 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One frame: start edge (with own/sent), then the frame, then the report.
  task automatic frame(input logic own, input logic [7:0] sent, input logic [7:0] d,
                       input logic pbit, input logic stopb, input logic se,
                       input samples_t p);
    tx_busy = own; tx_data = sent; rx_start = 1'b1;
    @(posedge clk); #0.1;
    rx_start = 1'b0; tx_busy = 1'b0; tx_data = 8'hEE;
    repeat (5) @(posedge clk); #0.1;
    fr.data = d; fr.parity_bit = pbit; fr.stop_bit = stopb; fr.sample_err = se;
    fr.err_pattern = p; fv = 1'b1;
    @(posedge clk); #0.1;
    fv = 1'b0; fr = '0;
    check(report, "report pulse");
    check(dout == d, "data passed on");
    @(posedge clk); #0.1;
    check(!report, "report is one cycle");
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    repeat (3) @(posedge clk); #0.1;
    for (int t = 0; t < 30; t++) begin
      logic good_p, flip;
      d = 8'($urandom);
      par = parity_e'(t % 3);
      good_p = (par == PAR_ODD) ? ~^d : ^d;
      flip = t[2];
      frame(1'b0, 8'h00, d, good_p ^ flip, 1'b1, 1'b0, '0);
      check(perr == (flip && par != PAR_NONE),
            $sformatf("parity err=%0d mode %0d flip %0d", perr, par, flip));
      check(!ferr && !serr && !berr, "no other error");
    end
    par = PAR_EVEN;
    frame(1'b0, 8'h00, 8'h12, ^8'h12, 1'b0, 1'b0, '0);
    check(ferr, "stop bit 0 is a framing error");
    frame(1'b0, 8'h00, 8'h12, ^8'h12, 1'b1, 1'b1, 16'hFF00);
    check(serr && diag && pat == 16'hFF00, "one level change: timing failure");
    frame(1'b0, 8'h00, 8'h12, ^8'h12, 1'b1, 1'b1, 16'hAAAA);
    check(serr && !diag && pat == 16'hAAAA, "alternating samples: noise");
    frame(1'b0, 8'h00, 8'h12, ^8'h12, 1'b1, 1'b1, 16'hFFF0);
    check(serr && diag, "edge late in cell: timing failure");
    frame(1'b0, 8'h00, 8'h12, ^8'h12, 1'b1, 1'b1, 16'h0FF0);
    check(serr && !diag, "two level changes: noise");
    frame(1'b1, 8'h5A, 8'h5A, ^8'h5A, 1'b1, 1'b0, '0);
    check(!berr, "own frame read back intact");
    frame(1'b1, 8'h5A, 8'h58, ^8'h58, 1'b1, 1'b0, '0);
    check(berr, "own frame read back changed: bit error");
    frame(1'b0, 8'h5A, 8'h58, ^8'h58, 1'b1, 1'b0, '0);
    check(!berr, "foreign frame never gives a bit error");
    check(pat == 16'h0FF0, "pattern held from last sampling error");
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
