// tcm_encoder: streaming TCM encoder of one local bus.
//
// One 8-bit group per clock: bits d[5:4] go through the rate-2/3
// convolutional encoder, which selects the 4-D subset, and the other six bits
// select the point inside it; the four resulting cell levels and the parity
// bit are registered. In single-page programming the levels are used
// directly (the encoder sits in line between the memory I/O and the page
// buffer); in multi-page programming only the parity is kept and the
// segment modulators turn it into levels later. The structure (convolutional
// encoder followed by the 4-D modulator) follows the design; the one-cycle
// output register and the parity output are this design's choices.
//
// Interface: in_valid/in_first/in_data in; one cycle later out_valid with
// out_levels[c] for cells 0..3 and out_parity. No back-pressure.
module tcm_encoder
  import tcm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  gbyte_t in_data,
  output logic   out_valid,
  output level_t out_levels [CELLS],
  output logic   out_parity
);

  logic [2:0] subset;
  logic       parity;
  level_t     mod_levels [CELLS];

  conv_encoder u_conv (
    .clk, .rst_n, .in_valid, .in_first,
    .u(in_data[5:4]), .subset, .parity
  );

  tcm_modulator u_mod (
    .subset, .label({in_data[7:6], in_data[3:0]}), .levels(mod_levels)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_parity <= 1'b0;
      for (int c = 0; c < CELLS; c++) out_levels[c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_levels <= mod_levels;
        out_parity <= parity;
      end
    end
  end

endmodule
