// tcm_subsystem: on-chip TCM sub-system of a 2-bit-per-cell NAND flash die.
//
// The on-chip data bus between the memory I/O and the page buffer is split
// into N_BUS local buses; each local bus carries one convolutional encoder,
// one TCM decoder and M segments, each segment with one 4-D modulator and G
// latch groups of four cells. The defaults (4 local buses, 32 segments each,
// 64 groups per segment: 128 modulators, 32768 cells, a 4 kB page per bit
// position) are the design's multi-page configuration. The outer BCH code is
// off chip and sees only decoded bytes; the cell array, its sensing sweep and
// its programming circuits lie outside and connect through the array ports.
//
// Interface: each local bus has its own host ports (index b) and per-segment
// array ports (index b, s); the word-line sweep inputs are shared. Timing
// per local bus is that of local_bus: one group per clock for writes and
// reads, 3*G cycles for a modulation pass.
module tcm_subsystem
  import tcm_pkg::*;
#(
  parameter int unsigned N_BUS = 4,
  parameter int unsigned M     = 32,
  parameter int unsigned G     = 64,
  parameter int unsigned DEPTH = 20,
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned AW = $clog2(M * G)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid     [N_BUS],
  input  logic [AW-1:0] wr_addr      [N_BUS],
  input  gbyte_t        wr_data      [N_BUS],
  input  logic [1:0]    wr_mask      [N_BUS],
  input  logic          wr_encode    [N_BUS],
  input  logic          wr_inline    [N_BUS],
  input  logic          mod_start    [N_BUS],
  output logic          mod_busy     [N_BUS],
  output logic          mod_done     [N_BUS],
  input  logic          rd_start     [N_BUS],
  input  logic [1:0]    rd_page      [N_BUS],
  input  logic          rd_bypass    [N_BUS],
  output logic          rd_busy      [N_BUS],
  output logic          out_valid    [N_BUS],
  output gbyte_t        out_data     [N_BUS],
  output logic [3:0]    out_nib      [N_BUS],
  output logic          switch_on    [N_BUS],
  input  logic [GW-1:0] arr_addr     [N_BUS][M],
  output level_t        arr_levels   [N_BUS][M][CELLS],
  output logic [3:0]    arr_bits     [N_BUS][M],
  input  logic          arr_page1_we [N_BUS][M],
  input  logic [3:0]    arr_page1    [N_BUS][M],
  input  logic          sweep_start,
  input  logic          step_valid,
  input  logic [3:0]    step_idx,
  input  logic [4*G-1:0] discharged  [N_BUS][M]
);

  for (genvar b = 0; b < N_BUS; b++) begin : g_bus
    local_bus #(.M(M), .G(G), .DEPTH(DEPTH)) u_lbus (
      .clk, .rst_n,
      .wr_valid(wr_valid[b]), .wr_addr(wr_addr[b]), .wr_data(wr_data[b]),
      .wr_mask(wr_mask[b]), .wr_encode(wr_encode[b]),
      .wr_inline(wr_inline[b]),
      .mod_start(mod_start[b]), .mod_busy(mod_busy[b]), .mod_done(mod_done[b]),
      .rd_start(rd_start[b]), .rd_page(rd_page[b]), .rd_bypass(rd_bypass[b]), .rd_busy(rd_busy[b]),
      .out_valid(out_valid[b]), .out_data(out_data[b]), .out_nib(out_nib[b]),
      .switch_on(switch_on[b]),
      .arr_addr(arr_addr[b]), .arr_levels(arr_levels[b]), .arr_bits(arr_bits[b]),
      .arr_page1_we(arr_page1_we[b]), .arr_page1(arr_page1[b]),
      .sweep_start, .step_valid, .step_idx,
      .discharged(discharged[b])
    );
  end

endmodule
