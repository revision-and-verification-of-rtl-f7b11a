// tb_euart_sample_eval: self-checking test of the bit-cell sample evaluator.
// Checks the two sample patterns of the document's figure on sample
// evaluation (eight 0s then eight 1s: a clean edge inside the cell; 0101...:
// a noisy cell), which are ties and hence sampling errors in both modes,
// then compares random patterns of every weight in both modes and for all
// thresholds with a reference computed in the testbench.
module tb_euart_sample_eval;
  import euart_pkg::*;
  samples_t   samples;
  os_mode_e   mode;
  logic [4:0] thr;
  logic       bitv, err;
  logic [4:0] ones;
  int checks = 0, failures = 0;

  euart_sample_eval dut (.samples_i(samples), .mode_i(mode), .threshold_i(thr),
                         .bit_o(bitv), .err_o(err), .ones_o(ones));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ref_check(input samples_t s, input os_mode_e m, input int t);
    int n1, n0, th;
    bit e, b;
    samples = s; mode = m; thr = 5'(t);
    #1;
    n1 = $countones(s); n0 = 16 - n1;
    th = (m == OS_MAJORITY) ? 9 : (t < 9 ? 9 : (t > 16 ? 16 : t));
    e = !(n1 >= th || n0 >= th);
    b = (n1 > n0) ? 1'b1 : (n0 > n1) ? 1'b0 : s[7];
    check(ones == 5'(n1), $sformatf("ones %0d vs %0d", ones, n1));
    check(err == e, $sformatf("err s=%h m=%0d t=%0d: %0d want %0d", s, m, t, err, e));
    check(bitv == b, $sformatf("bit s=%h m=%0d t=%0d: %0d want %0d", s, m, t, bitv, b));
  endtask

  initial begin
    // figure patterns: first sample printed leftmost = samples[0]
    samples = 16'hFF00; mode = OS_MAJORITY; thr = 5'd12; #1;
    check(err && ones == 5'd8, "edge in cell must be a sampling error");
    samples = 16'hAAAA; #1;
    check(err && ones == 5'd8, "noisy cell must be a sampling error");
    // clean cells
    samples = 16'hFFFF; mode = OS_ROBUST; thr = 5'd16; #1;
    check(!err && bitv, "all ones, threshold 16");
    samples = 16'h0000; #1;
    check(!err && !bitv, "all zeros, threshold 16");
    // one disturbed sample: accepted by majority and threshold 15, not 16
    samples = 16'hFFEF; mode = OS_MAJORITY; #1;
    check(!err && bitv, "15 of 16, majority");
    mode = OS_ROBUST; thr = 5'd16; #1;
    check(err && bitv, "15 of 16, threshold 16");
    thr = 5'd15; #1;
    check(!err && bitv, "15 of 16, threshold 15");
    // random patterns of every weight, both modes, all thresholds
    for (int w = 0; w <= 16; w++) begin
      repeat (20) begin
        samples_t s;
        int placed;
        s = '0; placed = 0;
        while (placed < w) begin
          int k;
          k = $urandom_range(0, 15);
          if (!s[k]) begin s[k] = 1'b1; placed++; end
        end
        ref_check(s, OS_MAJORITY, $urandom_range(0, 31));
        ref_check(s, OS_ROBUST, $urandom_range(0, 31));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
