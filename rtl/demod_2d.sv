// demod_2d: 2-D demodulator for one pair of cells.
//
// Combines the 1-D results of the two cells of a pair into the metric of the
// nearest point of each 2-D subset, A = (E,E), B = (F,F), C = (E,F) and
// D = (F,E): the metric is the sum of the two 1-D metrics and the point is
// the pair of 1-D decisions, as the design describes. The point is reported
// as its index inside the subset (numbering in tcm_pkg).
// Interface: purely combinational; res[s] for s = SUB_A..SUB_D.
module demod_2d
  import tcm_pkg::*;
(
  input  demod1_t c0,   // first cell of the pair
  input  demod1_t c1,   // second cell of the pair
  output demod2_t res [4]
);

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      m1_t    ma, mb;
      level_t la, lb;
      ma = first_is_f(sub2d_e'(s))  ? c0.mf : c0.me;
      la = first_is_f(sub2d_e'(s))  ? c0.lf : c0.le;
      mb = second_is_f(sub2d_e'(s)) ? c1.mf : c1.me;
      lb = second_is_f(sub2d_e'(s)) ? c1.lf : c1.le;
      res[s].metric = m2_t'(ma) + m2_t'(mb);
      res[s].idx    = 4'(index2d(sub2d_e'(s), la, lb));
    end
  end

endmodule
