// viterbi_re: state-parallel register-exchange Viterbi decoder of the TCM.
//
// Each clock accepts the eight 4-D subset branch metrics of one group (and
// the label of the best point in each subset) and runs add-compare-select
// for all 8 trellis states of the rate-2/3 code in parallel. Every state
// keeps a survivor register of DEPTH decoded group bytes; on each decision
// the registers are exchanged along the surviving branches, and the byte
// that falls out of the best state's register is the decoded output. The
// byte of a branch is rebuilt from the branch's two coded bits and the
// label of its subset. Register exchange and state parallelism follow the
// design; DEPTH, the metric width and the modulo (wrap-around) path metric
// arithmetic are this design's choices.
//
// Interface: in_first marks the first group of a page (the trellis starts
// in state 0), in_last its last group; after in_last the decoder flushes
// the remaining survivors of the best state, one byte per cycle, with
// in_ready low. Output bytes come in input order, DEPTH groups behind the
// input while streaming, registered (out_valid/out_data). Throughput is one
// group (8 bits) per clock.
module viterbi_re
  import tcm_pkg::*;
#(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned PM_W  = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  logic   in_last,
  output logic   in_ready,
  input  bm_t    bm    [NUM_SUBSETS],
  input  label_t label [NUM_SUBSETS],
  output logic   out_valid,
  output gbyte_t out_data
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  // start-up penalty of the states other than 0
  localparam logic [PM_W-1:0] INIT_PEN = PM_W'(1) << (PM_W - 3);

  typedef logic [PM_W-1:0] pm_t;

  pm_t        pm_q   [NUM_STATES];
  gbyte_t     sv_q   [NUM_STATES][DEPTH];
  logic [CNT_W-1:0] fill_q;
  logic       flush_q;
  logic [2:0] fl_state_q;
  logic [CNT_W-1:0] fl_idx_q;

  pm_t        pm_cur [NUM_STATES];
  pm_t        pm_new [NUM_STATES];
  logic [2:0] pred   [NUM_STATES];
  gbyte_t     sym    [NUM_STATES];
  logic [2:0] best;

  function automatic logic pm_less(pm_t a, pm_t b);
    pm_t diff;
    diff = a - b;
    return diff[PM_W-1];
  endfunction

  assign in_ready = !flush_q;

  // add-compare-select
  always_comb begin
    for (int s = 0; s < NUM_STATES; s++)
      pm_cur[s] = in_first ? ((s == 0) ? '0 : INIT_PEN) : pm_q[s];
    for (int ns = 0; ns < NUM_STATES; ns++) begin
      logic found;
      found      = 1'b0;
      pm_new[ns] = '0;
      pred[ns]   = '0;
      sym[ns]    = '0;
      for (int s = 0; s < NUM_STATES; s++) begin
        for (int u = 0; u < 4; u++) begin
          logic [2:0] p;
          pm_t        cand;
          p    = conv_subset(3'(s), 2'(u));
          cand = pm_cur[s] + pm_t'(bm[p]);
          if (conv_next(3'(s), 2'(u)) == 3'(ns) && (!found || pm_less(cand, pm_new[ns]))) begin
            found      = 1'b1;
            pm_new[ns] = cand;
            pred[ns]   = 3'(s);
            sym[ns]    = {label[p][5:4], 2'(u), label[p][3:0]};
          end
        end
      end
    end
    best = '0;
    for (int ns = 1; ns < NUM_STATES; ns++)
      if (pm_less(pm_new[ns], pm_new[best])) best = 3'(ns);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_STATES; s++) begin
        pm_q[s] <= '0;
        for (int k = 0; k < DEPTH; k++) sv_q[s][k] <= '0;
      end
      fill_q     <= '0;
      flush_q    <= 1'b0;
      fl_state_q <= '0;
      fl_idx_q   <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (flush_q) begin
        out_valid <= 1'b1;
        out_data  <= sv_q[fl_state_q][fl_idx_q];
        if (fl_idx_q == 0) flush_q <= 1'b0;
        else               fl_idx_q <= fl_idx_q - 1'b1;
      end else if (in_valid) begin
        logic [CNT_W-1:0] fill_now, fill_next;
        fill_now  = in_first ? '0 : fill_q;
        fill_next = (fill_now == CNT_W'(DEPTH)) ? fill_now : fill_now + 1'b1;
        for (int ns = 0; ns < NUM_STATES; ns++) begin
          pm_q[ns]     <= pm_new[ns];
          sv_q[ns][0]  <= sym[ns];
          for (int k = 1; k < DEPTH; k++) sv_q[ns][k] <= sv_q[pred[ns]][k-1];
        end
        if (fill_now == CNT_W'(DEPTH)) begin
          out_valid <= 1'b1;
          out_data  <= sv_q[pred[best]][DEPTH-1];
        end
        fill_q <= fill_next;
        if (in_last) begin
          flush_q    <= 1'b1;
          fl_state_q <= best;
          fl_idx_q   <= fill_next - 1'b1;
        end
      end
    end
  end

endmodule
