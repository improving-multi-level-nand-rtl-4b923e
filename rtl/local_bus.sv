// local_bus: one local bus of the on-chip TCM sub-system.
//
// The local bus joins M bus segments (each with G latch groups and one 4-D
// modulator) through bus switches and owns one TCM encoder (convolutional
// encoder + modulator) and one TCM decoder. It supports the programming and
// read data flows of the design:
//   * multi-page write: groups arrive one per clock over the joined bus; when
//     wr_encode is set the group's second-page bits d[5:4] run through the
//     convolutional encoder and the parity is stored with the group one cycle
//     later, so only last-page data are convolutionally coded and first-page
//     bits (loaded from the cells or written with wr_encode low) stay uncoded.
//   * single-page in-line write: with wr_inline (and wr_encode) set, the
//     whole byte is TCM-encoded on its way in and the four levels are stored
//     in the latch group directly, with no modulation pass.
//   * modulate: the switches open and all M segments modulate their groups
//     in parallel, 3 cycles per group, 3*G cycles in all.
//   * TCM read: the switches close and the sensing results of all M*G groups
//     stream, one group per clock, through the TCM decoder; the decoded bytes
//     come out in order, and out_nib carries the nibble of the page asked
//     for (rd_page 1 = first page, 2 = second page).
//   * first page alone: written with wr_encode low, its plain bits go to the
//     array through arr_bits for conventional programming.
//   * bypass read: with rd_bypass set the latch-group bytes stream out
//     unchanged, one per clock, without TCM decoding; this is the read of a
//     first page whose last page has not been programmed yet (the page is
//     protected by the off-chip BCH code alone).
// The partition into segments with switches, one encoder and decoder per
// local bus and the 3-step modulation follow the design; command signals,
// group order (address 0 first) and the nibble selection are this design's
// choices.
//
// Interface: wr_* write a group at wr_addr (segment = wr_addr / G); wr_addr 0
// restarts the encoder; the encoder's write-back lands one cycle after each
// write, so mod_start must wait one idle cycle after the last write.
// mod_start/mod_busy/mod_done control modulation.
// rd_start starts a read of the whole bus; rd_busy stays high until the last
// of the M*G output bytes (out_valid/out_data/out_nib) has left. No write,
// modulation or read may start while another operation is busy.
module local_bus
  import tcm_pkg::*;
#(
  parameter int unsigned M     = 32,
  parameter int unsigned G     = 64,
  parameter int unsigned DEPTH = 20,
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned AW = $clog2(M * G)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host (internal data bus) side
  input  logic          wr_valid,
  input  logic [AW-1:0] wr_addr,
  input  gbyte_t        wr_data,
  input  logic [1:0]    wr_mask,
  input  logic          wr_encode,
  input  logic          wr_inline,
  input  logic          mod_start,
  output logic          mod_busy,
  output logic          mod_done,
  input  logic          rd_start,
  input  logic [1:0]    rd_page,
  input  logic          rd_bypass,
  output logic          rd_busy,
  output logic          out_valid,
  output gbyte_t        out_data,
  output logic [3:0]    out_nib,
  output logic          switch_on,
  // array side, per segment
  input  logic [GW-1:0] arr_addr     [M],
  output level_t        arr_levels   [M][CELLS],
  output logic [3:0]    arr_bits     [M],
  input  logic          arr_page1_we [M],
  input  logic [3:0]    arr_page1    [M],
  input  logic          sweep_start,
  input  logic          step_valid,
  input  logic [3:0]    step_idx,
  input  logic [4*G-1:0] discharged  [M]
);

  localparam int unsigned NG = M * G;

  // segment signals
  gbyte_t seg_rdata   [M];
  q_t     seg_rq      [M][CELLS];
  logic   seg_rdefect [M][CELLS];
  logic   seg_busy    [M];
  logic   seg_done    [M];
  logic [GW-1:0] rd_grp;
  logic [GW-1:0] wr_grp;

  // TCM encoder on the write path and its delayed write-back
  logic          enc_valid;
  level_t        enc_levels [CELLS];
  logic          enc_parity;
  logic [AW-1:0] wr_addr_d;
  logic          wr_inline_d;
  logic [GW-1:0] wr_grp_d;

  // read streaming
  logic          rd_active_q;
  logic [AW-1:0] rd_addr_q;
  logic [AW:0]   rd_out_cnt_q;
  logic [1:0]    rd_page_q;
  logic          rd_bypass_q;
  logic          byp_valid_q;
  gbyte_t        byp_data_q;
  logic          dec_in_valid, dec_in_ready, dec_out_valid;
  gbyte_t        dec_out_data;
  q_t            dec_q      [CELLS];
  logic          dec_defect [CELLS];
  localparam int SW = (M > 1) ? $clog2(M) : 1;
  logic [SW-1:0] rd_seg;

  assign wr_grp = GW'(wr_addr % AW'(G));
  assign rd_grp = GW'(rd_addr_q % AW'(G));
  assign rd_seg = SW'(int'(rd_addr_q) / G);

  tcm_encoder u_enc (
    .clk, .rst_n,
    .in_valid(wr_valid && wr_encode),
    .in_first(wr_addr == '0),
    .in_data(wr_data),
    .out_valid(enc_valid),
    .out_levels(enc_levels),
    .out_parity(enc_parity)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr_d   <= '0;
      wr_inline_d <= 1'b0;
    end else if (wr_valid && wr_encode) begin
      wr_addr_d   <= wr_addr;
      wr_inline_d <= wr_inline;
    end
  end

  assign wr_grp_d = GW'(wr_addr_d % AW'(G));

  for (genvar s = 0; s < M; s++) begin : g_seg
    logic sel_wr, sel_p;
    assign sel_wr = wr_valid && (int'(wr_addr) / G == s);
    assign sel_p  = enc_valid && (int'(wr_addr_d) / G == s);
    bus_segment #(.G(G)) u_seg (
      .clk, .rst_n,
      .bus_we(sel_wr),
      .bus_addr(wr_grp),
      .bus_wdata(wr_data),
      .bus_wmask(wr_mask),
      .bus_pwe(sel_p),
      .bus_paddr(wr_grp_d),
      .bus_wpar(enc_parity),
      .bus_lvl_we(wr_inline_d),
      .bus_wlvl(enc_levels),
      .bus_raddr(rd_grp),
      .bus_rdata(seg_rdata[s]),
      .bus_rq(seg_rq[s]),
      .bus_rdefect(seg_rdefect[s]),
      .mod_start,
      .mod_busy(seg_busy[s]),
      .mod_done(seg_done[s]),
      .arr_addr(arr_addr[s]),
      .arr_levels(arr_levels[s]),
      .arr_bits(arr_bits[s]),
      .arr_page1_we(arr_page1_we[s]),
      .arr_page1(arr_page1[s]),
      .sweep_start, .step_valid, .step_idx,
      .discharged(discharged[s])
    );
  end

  // all segments run in lock step; segment 0 stands for all
  assign mod_busy  = seg_busy[0];
  assign mod_done  = seg_done[0];
  assign switch_on = !mod_busy;

  // bus multiplexer for the read stream (switches closed)
  always_comb begin
    for (int c = 0; c < CELLS; c++) begin
      dec_q[c]      = seg_rq[rd_seg][c];
      dec_defect[c] = seg_rdefect[rd_seg][c];
    end
  end

  assign dec_in_valid = rd_active_q && !rd_bypass_q && dec_in_ready;

  tcm_decoder #(.DEPTH(DEPTH)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid),
    .in_first(rd_addr_q == '0),
    .in_last(rd_addr_q == AW'(NG - 1)),
    .in_ready(dec_in_ready),
    .q(dec_q), .defect(dec_defect),
    .out_valid(dec_out_valid), .out_data(dec_out_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active_q  <= 1'b0;
      rd_addr_q    <= '0;
      rd_out_cnt_q <= '0;
      rd_page_q    <= '0;
      rd_bypass_q  <= 1'b0;
      rd_busy      <= 1'b0;
      byp_valid_q  <= 1'b0;
      byp_data_q   <= '0;
    end else begin
      byp_valid_q <= 1'b0;
      if (rd_start && !rd_busy) begin
        rd_bypass_q  <= rd_bypass;
        rd_active_q  <= 1'b1;
        rd_addr_q    <= '0;
        rd_out_cnt_q <= '0;
        rd_page_q    <= rd_page;
        rd_busy      <= 1'b1;
      end else begin
        if (dec_in_valid || (rd_active_q && rd_bypass_q)) begin
          if (rd_addr_q == AW'(NG - 1)) rd_active_q <= 1'b0;
          else                          rd_addr_q   <= rd_addr_q + 1'b1;
        end
        if (rd_active_q && rd_bypass_q) begin
          byp_valid_q <= 1'b1;
          byp_data_q  <= seg_rdata[rd_seg];
        end
        if (out_valid) begin
          rd_out_cnt_q <= rd_out_cnt_q + 1'b1;
          if (rd_out_cnt_q == (AW+1)'(NG - 1)) rd_busy <= 1'b0;
        end
      end
    end
  end

  assign out_valid = dec_out_valid || byp_valid_q;
  assign out_data  = byp_valid_q ? byp_data_q : dec_out_data;
  assign out_nib   = (rd_page_q == 2'd2) ? out_data[7:4] : out_data[3:0];

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> !(mod_busy || rd_busy));
  a_no_start_before_writeback: assert property (@(posedge clk) disable iff (!rst_n)
    mod_start |-> !enc_valid);
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    mod_start |-> !(mod_busy || rd_busy));

endmodule
