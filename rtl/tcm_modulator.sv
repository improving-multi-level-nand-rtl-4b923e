// tcm_modulator: 4-D modulator of the TCM encoder.
//
// Maps 9 bits onto the levels of four 5-level cells: the 3-bit subset index
// from the convolutional encoder picks one of the eight 4-D subsets P1..P8,
// and the 6 uncoded bits pick one of that subset's 64 points. The mapping is
// built hierarchically from 1-D subsets E/F and 2-D subsets A..D as the
// design describes; the numbering of points is this design's choice and is
// spelled out in tcm_pkg.
//
// Interface: purely combinational. subset = {y0, y2, y1}; label = {d[7:6],
// d[3:0]} of the group byte; levels[c] is the level (0..4) for cell c.
module tcm_modulator
  import tcm_pkg::*;
(
  input  logic [2:0] subset,
  input  label_t     label,
  output level_t     levels [CELLS]
);

  logic [11:0] packed_levels;

  assign packed_levels = modulate(subset, label);

  always_comb begin
    for (int c = 0; c < CELLS; c++) levels[c] = packed_levels[3*c +: 3];
  end

endmodule
