// tcm_decoder: TCM decoder, 4-D demodulator followed by the Viterbi decoder.
//
// Takes the four 4-bit sensing results of one group (and the defect flags of
// its cells) per clock, forms the eight subset branch metrics and best-point
// labels, and decodes them with the register-exchange Viterbi decoder into
// the group's 8 user bits. The structure follows the design; the demodulator
// is combinational in front of the Viterbi decoder's registers.
//
// Interface: in_valid/in_first/in_last/in_ready handshake as in viterbi_re;
// out_valid/out_data give decoded bytes in order, DEPTH groups behind the
// input while streaming and flushed after in_last.
module tcm_decoder
  import tcm_pkg::*;
#(
  parameter int unsigned DEPTH = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  logic   in_last,
  output logic   in_ready,
  input  q_t     q      [CELLS],
  input  logic   defect [CELLS],
  output logic   out_valid,
  output gbyte_t out_data
);

  bm_t    bm    [NUM_SUBSETS];
  label_t label [NUM_SUBSETS];

  demod_4d u_demod (.q, .erase(defect), .bm, .label);

  viterbi_re #(.DEPTH(DEPTH)) u_vit (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .in_ready,
    .bm, .label, .out_valid, .out_data
  );

endmodule
