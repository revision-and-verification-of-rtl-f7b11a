// euart_sample_eval: evaluation of the 16 samples of one bit cell.
//
// The receiver samples every bit cell 16 times; this combinational block
// turns the samples into a bit value. Two interpretations can be chosen, as
// the document describes:
//   OS_MAJORITY (maximum availability): the bit is the level held by more
//     than half of the samples; only an 8:8 tie is a sampling error.
//   OS_ROBUST (maximum robustness): one level must be held by at least
//     threshold_i samples (a configurable, clearly higher number); otherwise
//     the cell is a sampling error. Thresholds below a strict majority (9)
//     are raised to 9, thresholds above 16 are lowered to 16.
// On a sampling error bit_o still gives a best guess: the majority level,
// or on a tie the level of sample 7, the middle of the cell. The
// tie-breaking rule and the threshold clamping are this design's choice.
// samples_i[0] is the first sample of the cell.
module euart_sample_eval
  import euart_pkg::*;
(
  input  samples_t   samples_i,
  input  os_mode_e   mode_i,
  input  logic [4:0] threshold_i,
  output logic       bit_o,
  output logic       err_o,
  output logic [4:0] ones_o
);

  localparam logic [4:0] MAJ = 5'(OVERSAMPLE / 2 + 1);   // 9
  localparam logic [4:0] ALL = 5'(OVERSAMPLE);           // 16

  logic [4:0] ones, zeros, thr;

  always_comb begin
    ones = '0;
    for (int i = 0; i < OVERSAMPLE; i++) ones += 5'(samples_i[i]);
    zeros = ALL - ones;

    if (mode_i == OS_MAJORITY || threshold_i < MAJ) thr = MAJ;
    else if (threshold_i > ALL)                     thr = ALL;
    else                                            thr = threshold_i;

    if (ones >= thr) begin
      bit_o = 1'b1;
      err_o = 1'b0;
    end else if (zeros >= thr) begin
      bit_o = 1'b0;
      err_o = 1'b0;
    end else begin
      err_o = 1'b1;
      if (ones > zeros)      bit_o = 1'b1;
      else if (zeros > ones) bit_o = 1'b0;
      else                   bit_o = samples_i[OVERSAMPLE/2 - 1];
    end
  end

  assign ones_o = ones;

endmodule
