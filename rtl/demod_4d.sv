// demod_4d: 4-D demodulator producing the Viterbi branch metrics.
//
// Four 1-D demodulators (one per cell) feed two 2-D demodulators (cells 0,1
// and cells 2,3). For each 4-D subset P1..P8, the union of two types (X,Y),
// the metric of a type is metric_X(pair 0) + metric_Y(pair 1) and the subset
// metric is the smaller of its two types (ties to the first); the winning
// point is turned into its 6-bit label. This hierarchy follows the design.
// Points of a type that carry no label fold onto the type's last labelled
// point (tcm_pkg::demap); that rule is this design's choice.
// A cell flagged in erase is left out of all distances (reduced-dimension
// demodulation of defective cells).
// Interface: purely combinational; bm[p] and label[p] for subset index p.
module demod_4d
  import tcm_pkg::*;
(
  input  q_t     q     [CELLS],
  input  logic   erase [CELLS],
  output bm_t    bm    [NUM_SUBSETS],
  output label_t label [NUM_SUBSETS]
);

  demod1_t d1 [CELLS];
  demod2_t p0 [4];
  demod2_t p1 [4];

  for (genvar c = 0; c < CELLS; c++) begin : g_1d
    demod_1d u_1d (.q(q[c]), .erase(erase[c]), .res(d1[c]));
  end

  demod_2d u_2d_0 (.c0(d1[0]), .c1(d1[1]), .res(p0));
  demod_2d u_2d_1 (.c0(d1[2]), .c1(d1[3]), .res(p1));

  always_comb begin
    for (int p = 0; p < NUM_SUBSETS; p++) begin
      bm_t    m0, m1;
      sub2d_e x0, y0, x1, y1;
      x0 = type_x(3'(p), 1'b0);
      y0 = type_y(3'(p), 1'b0);
      x1 = type_x(3'(p), 1'b1);
      y1 = type_y(3'(p), 1'b1);
      m0 = bm_t'(p0[x0].metric) + bm_t'(p1[y0].metric);
      m1 = bm_t'(p0[x1].metric) + bm_t'(p1[y1].metric);
      if (m1 < m0) begin
        bm[p]    = m1;
        label[p] = demap(3'(p), 1'b1, int'(p0[x1].idx), int'(p1[y1].idx));
      end else begin
        bm[p]    = m0;
        label[p] = demap(3'(p), 1'b0, int'(p0[x0].idx), int'(p1[y0].idx));
      end
    end
  end

endmodule
