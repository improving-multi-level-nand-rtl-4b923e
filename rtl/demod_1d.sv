// demod_1d: 1-D demodulator for one sensed cell.
//
// Given the 4-bit quantized sensing result q of one cell, finds the nearest
// level in subset E = {0,2,4} and in subset F = {1,3} and their squared
// Euclidean distances (Metric_E, Metric_F), as the hierarchical demodulation
// of the design starts. Distances are exact integers in (1/32 level)^2 units
// using the bin centres of tcm_pkg; ties go to the lower level.
// When erase is set (the cell was found defective during sensing) the cell
// is removed from the distance computation: both metrics are zero and the
// levels reported are fixed ones, ERASE_E_LEVEL and ERASE_F_LEVEL, fixed at
// design time as the design prescribes (their values are this design's
// choice).
// Interface: purely combinational.
module demod_1d
  import tcm_pkg::*;
#(
  parameter level_t ERASE_E_LEVEL = 3'd2,
  parameter level_t ERASE_F_LEVEL = 3'd1
) (
  input  q_t      q,
  input  logic    erase,
  output demod1_t res
);

  always_comb begin
    m1_t d;
    res.me = dist2(q, 3'd0);
    res.le = 3'd0;
    for (int l = 2; l <= 4; l += 2) begin
      d = dist2(q, level_t'(l));
      if (d < res.me) begin
        res.me = d;
        res.le = level_t'(l);
      end
    end
    res.mf = dist2(q, 3'd1);
    res.lf = 3'd1;
    d = dist2(q, 3'd3);
    if (d < res.mf) begin
      res.mf = d;
      res.lf = 3'd3;
    end
    if (erase) begin
      res.me = '0;
      res.le = ERASE_E_LEVEL;
      res.mf = '0;
      res.lf = ERASE_F_LEVEL;
    end
  end

endmodule
