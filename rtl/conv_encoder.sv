// conv_encoder: rate-2/3, 8-state convolutional encoder of the 4-D TCM.
//
// For every group of four cells two data bits u = {y2, y1} (group bits d[5:4])
// enter the encoder, which returns the 3-bit 4-D subset index {y0, y2, y1}:
// y2 and y1 pass through unchanged (systematic) and y0 is a parity bit taken
// from the state. The code rate 2/3 and the 8-state trellis follow the
// design; the code itself is this design's choice, a systematic feedback code
// with parity-check polynomials h0 = 11, h1 = 02, h2 = 04 (octal), for which
// y0(n) = y0(n-3) ^ y1(n-1) ^ y2(n-2). Because y0 depends only on the state,
// every branch leaving or entering a state uses subsets of the same half
// {P1..P4} or {P5..P8}.
//
// Interface: in_valid qualifies u; in_first starts a new page (the symbol is
// encoded from state 0). subset/parity are combinational from the current
// state and u; the state advances on the clock edge of a valid symbol.
module conv_encoder
  import tcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic [1:0] u,
  output logic [2:0] subset,
  output logic       parity
);

  logic [2:0] state_q, state_cur;

  assign state_cur = in_first ? 3'd0 : state_q;
  assign subset    = conv_subset(state_cur, u);
  assign parity    = subset[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state_q <= 3'd0;
    else if (in_valid) state_q <= conv_next(state_cur, u);
  end

endmodule
