// tb_euart_sync: self-checking test of the synchronisation detector.
// Feeds sequences of transition intervals (in clock cycles) and checks when
// the pattern is recognised and the bit period reported. Directed cases:
// a clean pattern of 8 cells of 50 cycles (brs 800 = 50.0 in Q12.4), a
// pattern with +/-1 cycle jitter, a pattern preceded by a broken run, the
// tolerance boundary (reference 64: 68 passes, 69 restarts), the aliasing
// case of the document's symmetric time slot (runs of 6 and 7 bit cells
// with a short parity bit in between never synchronise), intervals too short
// for oversampling, and a disabled detector. Random sequences are then
// compared with a reference model of the algorithm written in the testbench.
module tb_euart_sync;
  import euart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, edge_p = 1'b0;
  logic done;
  brs_t brs;
  int checks = 0, failures = 0;
  int ndone = 0;
  brs_t last_brs;
  int done_edge_idx = -1, edge_idx = 0;

  euart_sync dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .edge_i(edge_p),
                  .done_o(done), .brs_o(brs));

  always #1 clk = ~clk;

  always @(posedge clk) if (done) begin
    ndone++;
    last_brs = brs;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference model: returns the number of the interval (0-based) on which
  // the pattern completes and its period, or -1.
  function automatic int model(input int iv[$], output int brs_out);
    int ref_iv = 0, n = 0, sum = 0;
    brs_out = 0;
    foreach (iv[i]) begin
      int d;
      if (iv[i] < 16 || iv[i] > 4096) begin n = 0; continue; end
      d = (iv[i] > ref_iv) ? iv[i] - ref_iv : ref_iv - iv[i];
      if (n == 0 || d > ref_iv / 16) begin
        ref_iv = iv[i]; sum = iv[i]; n = 1;
      end else begin
        sum += iv[i]; n++;
        if (n == 8) begin brs_out = sum * 2; return i; end
      end
    end
    return -1;
  endfunction

  // Play edges: first edge, then one edge after each interval. Returns the
  // interval index after which done was seen, or -1.
  task automatic play(input int iv[$], output int at, output int brs_seen);
    int n_prev;
    at = -1; brs_seen = 0;
    en = 1'b1;
    @(posedge clk); #0.1;
    edge_p = 1'b1; @(posedge clk); #0.1; edge_p = 1'b0;
    foreach (iv[i]) begin
      n_prev = ndone;
      repeat (iv[i] - 1) @(posedge clk);
      #0.1 edge_p = 1'b1; @(posedge clk); #0.1; edge_p = 1'b0;
      @(posedge clk); #0.1;   // done_o is registered
      if (ndone != n_prev && at < 0) begin at = i; brs_seen = int'(last_brs); end
      // keep intervals exact: the extra wait above is part of the next one
      if (i + 1 < iv.size()) iv[i+1] = iv[i+1] - 1;
    end
    en = 1'b0;
    @(posedge clk); #0.1;
  endtask

  task automatic expect_seq(input int iv[$], input string name);
    int at, b, m_at, m_b;
    int orig[$];
    orig = iv;
    m_at = model(orig, m_b);
    play(iv, at, b);
    check(at == m_at, $sformatf("%s: done after interval %0d, model %0d", name, at, m_at));
    if (m_at >= 0)
      check(b == m_b, $sformatf("%s: brs %0d, model %0d", name, b, m_b));
  endtask

  initial begin
    int at, b;
    int q[$];
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // clean pattern, independent expectation
    q = {50, 50, 50, 50, 50, 50, 50, 50};
    play(q, at, b);
    check(at == 7, $sformatf("clean: done at %0d", at));
    check(b == 800, $sformatf("clean: brs %0d", b));
    // jitter of one cycle
    q = {50, 51, 49, 50, 51, 50, 49, 52};
    play(q, at, b);
    check(at == 7 && b == 2 * 402, $sformatf("jitter: at %0d brs %0d", at, b));
    // a broken run first: 50,50,80 restarts with 80 as reference
    q = {50, 50, 80, 80, 80, 80, 80, 80, 80, 80};
    play(q, at, b);
    check(at == 9 && b == 1280, $sformatf("restart: at %0d brs %0d", at, b));
    // tolerance boundary around reference 64 (tolerance 4)
    q = {64, 68, 60, 64, 64, 64, 64, 64};
    play(q, at, b);
    check(at == 7, $sformatf("tolerance in: at %0d", at));
    q = {64, 69, 64, 64, 64, 64, 64, 64};
    play(q, at, b);
    check(at == -1, $sformatf("tolerance out: at %0d", at));
    // aliasing: slot of 13 cells of 20 cycles with 6 zeros, 6 ones and a
    // one-cell parity bit, repeated: intervals 120,120,20,20 ...
    q = {};
    repeat (4) q = {q, 140, 120, 20, 20};
    play(q, at, b);
    check(at == -1, "aliasing pattern synchronised");
    // too short for 16-fold oversampling
    q = {10, 10, 10, 10, 10, 10, 10, 10, 10};
    play(q, at, b);
    check(at == -1, "too-short intervals synchronised");
    // disabled detector never fires
    begin
      int n_prev;
      n_prev = ndone;
      repeat (12) begin
        edge_p = 1'b1; @(posedge clk); #0.1; edge_p = 1'b0;
        repeat (49) @(posedge clk);
      end
      #0.1 check(ndone == n_prev, "disabled detector fired");
    end
    // random sequences against the model
    for (int t = 0; t < 40; t++) begin
      int base;
      base = 16 + $urandom_range(0, 300);
      q = {};
      repeat (12) begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 7) q.push_back(base + $urandom_range(0, base / 8) - base / 16);
        else       q.push_back($urandom_range(17, 600));
      end
      expect_seq(q, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
