// tcm_pkg: constants, types and functions shared by the 4-D trellis-coded
// modulation (TCM) encoder and decoder for 2-bit-per-cell NAND flash.
//
// Each group of four cells stores 8 user bits plus 1 convolutional parity bit
// on five threshold-voltage levels (0..4) per cell. The 4-D constellation is
// partitioned hierarchically: each 1-D cell splits into E = {0,2,4} and
// F = {1,3}; each cell pair into A = (E,E), B = (F,F), C = (E,F), D = (F,E);
// the four cells into eight 4-D subsets P1..P8, each the union of two 4-D
// "types" (pairs of 2-D subsets), following the subset table of the design:
//   P1 (A,A)u(B,B)  P2 (C,C)u(D,D)  P3 (A,B)u(B,A)  P4 (C,D)u(D,C)
//   P5 (A,C)u(B,D)  P6 (C,B)u(D,A)  P7 (A,D)u(B,C)  P8 (C,A)u(D,B)
// The partition and the subset table follow the design; which 64 points of
// each subset carry the 6 uncoded bits, and how they are numbered, is this
// design's own choice:
//   * a point inside a 2-D subset is numbered i = i1*n2 + i2, with i1, i2 the
//     positions of the two levels inside their 1-D subsets (E: 0,2,4 -> 0,1,2;
//     F: 1,3 -> 0,1) and n2 the size of the second 1-D subset;
//   * a point inside a 4-D type (X,Y) is numbered j = jx*|Y| + jy;
//   * a subset takes the first m0 points of its first type and the first
//     64-m0 points of its second type, with m0 = 32 when both types hold at
//     least 32 points, otherwise the smaller type is taken whole; the 6-bit
//     label k is j for the first type and m0 + j for the second.
// Group data byte d: d[3:0] are the four cells' first-page bits, d[7:4] their
// second-page bits. d[5:4] enter the convolutional encoder; the label is
// k = {d[7:6], d[3:0]}, so in multi-page programming only last-page bits are
// convolutionally coded.
// Sensing uses 16 uniform quantization bins over [-0.5, 4.5] level units;
// all distances are kept in units of 1/32 level: bin q has its centre at
// 10*q - 11 and level L sits at 32*L.
package tcm_pkg;

  localparam int unsigned CELLS      = 4;   // cells per modulation group
  localparam int unsigned NUM_LEVELS = 5;   // storage levels per cell
  localparam int unsigned NUM_SUBSETS = 8;  // 4-D subsets
  localparam int unsigned NUM_STATES = 8;   // trellis states
  localparam int unsigned LABEL_W    = 6;   // uncoded bits per group
  localparam int unsigned M1_W       = 15;  // 1-D squared distance width
  localparam int unsigned M2_W       = 16;  // 2-D metric width
  localparam int unsigned BM_W       = 17;  // 4-D branch metric width

  typedef logic [2:0]  level_t;   // programmed level 0..4
  typedef logic [3:0]  q_t;       // sensed quantization bin 0..15
  typedef logic [7:0]  gbyte_t;   // user data of one group
  typedef logic [LABEL_W-1:0] label_t;
  typedef logic [M1_W-1:0] m1_t;
  typedef logic [M2_W-1:0] m2_t;
  typedef logic [BM_W-1:0] bm_t;

  // 1-D demodulator result: best level and squared distance in E and in F
  typedef struct packed {
    m1_t    me;
    level_t le;
    m1_t    mf;
    level_t lf;
  } demod1_t;

  // 2-D demodulator result for one 2-D subset: metric and point index
  typedef struct packed {
    m2_t        metric;
    logic [3:0] idx;
  } demod2_t;

  typedef enum logic [1:0] {SUB_A = 2'd0, SUB_B = 2'd1, SUB_C = 2'd2, SUB_D = 2'd3} sub2d_e;

  // 1-D subset of the first / second cell of a 2-D subset (0 = E, 1 = F)
  function automatic logic first_is_f(sub2d_e s);
    return (s == SUB_B) || (s == SUB_D);
  endfunction

  function automatic logic second_is_f(sub2d_e s);
    return (s == SUB_B) || (s == SUB_C);
  endfunction

  function automatic int unsigned size1d(logic is_f);
    return is_f ? 2 : 3;
  endfunction

  function automatic int unsigned size2d(sub2d_e s);
    return size1d(first_is_f(s)) * size1d(second_is_f(s));
  endfunction

  // level of position i inside subset E (is_f=0) or F (is_f=1)
  function automatic level_t level1d(logic is_f, int unsigned i);
    return is_f ? level_t'(2 * i + 1) : level_t'(2 * i);
  endfunction

  // position of a level inside its 1-D subset
  function automatic int unsigned pos1d(level_t l);
    return int'(l) / 2;
  endfunction

  // Subset table: 2-D subsets of type t (0/1) of 4-D subset p (P1 = 0)
  function automatic sub2d_e type_x(logic [2:0] p, logic t);
    case (p)
      3'd0: return t ? SUB_B : SUB_A;
      3'd1: return t ? SUB_D : SUB_C;
      3'd2: return t ? SUB_B : SUB_A;
      3'd3: return t ? SUB_D : SUB_C;
      3'd4: return t ? SUB_B : SUB_A;
      3'd5: return t ? SUB_D : SUB_C;
      3'd6: return t ? SUB_B : SUB_A;
      default: return t ? SUB_D : SUB_C;
    endcase
  endfunction

  function automatic sub2d_e type_y(logic [2:0] p, logic t);
    case (p)
      3'd0: return t ? SUB_B : SUB_A;
      3'd1: return t ? SUB_D : SUB_C;
      3'd2: return t ? SUB_A : SUB_B;
      3'd3: return t ? SUB_C : SUB_D;
      3'd4: return t ? SUB_D : SUB_C;
      3'd5: return t ? SUB_A : SUB_B;
      3'd6: return t ? SUB_C : SUB_D;
      default: return t ? SUB_B : SUB_A;
    endcase
  endfunction

  function automatic int unsigned type_size(logic [2:0] p, logic t);
    return size2d(type_x(p, t)) * size2d(type_y(p, t));
  endfunction

  // number of labels carried by the first type of subset p
  function automatic int unsigned type0_count(logic [2:0] p);
    int unsigned n0, n1;
    n0 = type_size(p, 1'b0);
    n1 = type_size(p, 1'b1);
    if (n0 >= 32 && n1 >= 32) return 32;
    else if (n1 < n0)         return 64 - n1;
    else                      return n0;
  endfunction

  // levels of point i of a 2-D subset: {second cell, first cell}
  function automatic logic [5:0] point2d(sub2d_e s, int unsigned i);
    int unsigned n2;
    n2 = size1d(second_is_f(s));
    return {level1d(second_is_f(s), i % n2), level1d(first_is_f(s), i / n2)};
  endfunction

  // index of a 2-D point inside its subset from its two levels
  function automatic int unsigned index2d(sub2d_e s, level_t l1, level_t l2);
    return pos1d(l1) * size1d(second_is_f(s)) + pos1d(l2);
  endfunction

  // 4-D modulation: subset p, label k -> levels, cell c in bits [3c +: 3]
  function automatic logic [11:0] modulate(logic [2:0] p, label_t k);
    int unsigned m0, j, ny;
    logic t;
    sub2d_e sx, sy;
    m0 = type0_count(p);
    t  = (int'(k) >= int'(m0));
    j  = t ? int'(k) - m0 : int'(k);
    sx = type_x(p, t);
    sy = type_y(p, t);
    ny = size2d(sy);
    // cells 0,1 form the first pair (subset sx), cells 2,3 the second (sy)
    return {point2d(sy, j % ny), point2d(sx, j / ny)};
  endfunction

  // label of the point (type t, 2-D indices jx, jy) of subset p; points of
  // the type outside the 64 in use are folded onto its last used point
  function automatic label_t demap(logic [2:0] p, logic t, int unsigned jx, int unsigned jy);
    int unsigned m0, mt, j;
    m0 = type0_count(p);
    mt = t ? 64 - m0 : m0;
    j  = jx * size2d(type_y(p, t)) + jy;
    if (j >= mt) j = mt - 1;
    return t ? label_t'(m0 + j) : label_t'(j);
  endfunction

  // squared distance between sensed bin q and level l, in (1/32 level)^2
  function automatic m1_t dist2(q_t q, level_t l);
    int d;
    d = 10 * int'(q) - 11 - 32 * int'(l);
    return m1_t'(d * d);
  endfunction

  // rate-2/3 systematic feedback encoder (parity check 11, 02, 04 octal):
  // state s = {s3, s2, s1}; parity y0 = s3; u = {y2, y1}
  function automatic logic [2:0] conv_next(logic [2:0] s, logic [1:0] u);
    return {s[1] ^ u[0], s[0] ^ u[1], s[2]};
  endfunction

  // 4-D subset index selected by a transition: {y0, y2, y1}
  function automatic logic [2:0] conv_subset(logic [2:0] s, logic [1:0] u);
    return {s[2], u};
  endfunction

endpackage
