// bus_segment: one segment of a local bus with its page-buffer latch groups
// and its own 4-D modulator.
//
// The segment holds G latch groups; a latch group covers the four cells of
// one 4-D modulation: their 8 data bits, the convolutional parity bit, the
// four levels to program and (in the sense latches) the four sensing
// results with their defect flags. While the bus switches are on, the local
// bus writes and reads latch groups through the bus port. When modulation is
// started the switches are off and the segment modulates its groups one by
// one, three clock cycles per group: (1) load the group into the modulator,
// (2) modulate, (3) write the levels back into the group. This follows the
// design; the register between steps and the port layout are this design's
// choices. For a first page programmed on its own (no TCM yet, the outer
// code alone protects it) the array reads the plain first-page bits of a
// group at arr_bits.
//
// Interface: bus write (bus_we, bus_wmask bit 0 = first-page nibble, bit 1 =
// second-page nibble), a second write port for what the local bus encoder
// returns one cycle later (bus_pwe/bus_paddr: the parity, and with
// bus_lvl_we the levels of an in-line encoded group) and combinational bus
// read at bus_raddr. mod_start begins modulation; mod_busy is high for 3*G cycles
// and mod_done pulses in the last one. The array side reads the levels of a
// group (arr_addr), loads first-page bits read from the cells (arr_page1_we),
// and drives the word-line sweep into the sense latches.
module bus_segment
  import tcm_pkg::*;
#(
  parameter int unsigned G  = 64,
  localparam int unsigned AW = (G > 1) ? $clog2(G) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // local bus side
  input  logic            bus_we,
  input  logic [AW-1:0]   bus_addr,
  input  gbyte_t          bus_wdata,
  input  logic [1:0]      bus_wmask,
  input  logic            bus_pwe,
  input  logic [AW-1:0]   bus_paddr,
  input  logic            bus_wpar,
  input  logic            bus_lvl_we,
  input  level_t          bus_wlvl [CELLS],
  input  logic [AW-1:0]   bus_raddr,
  output gbyte_t          bus_rdata,
  output q_t              bus_rq      [CELLS],
  output logic            bus_rdefect [CELLS],
  // modulation control
  input  logic            mod_start,
  output logic            mod_busy,
  output logic            mod_done,
  // array side
  input  logic [AW-1:0]   arr_addr,
  output level_t          arr_levels [CELLS],
  output logic [3:0]      arr_bits,
  input  logic            arr_page1_we,
  input  logic [3:0]      arr_page1,
  input  logic            sweep_start,
  input  logic            step_valid,
  input  logic [3:0]      step_idx,
  input  logic [4*G-1:0]  discharged
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_MOD, S_STORE} seq_e;

  gbyte_t      data_mem [G];
  logic        par_mem  [G];
  logic [11:0] lvl_mem  [G];

  q_t          sq  [4*G];
  logic [4*G-1:0] sdef;

  seq_e        state_q;
  logic [AW-1:0] grp_q;
  logic [2:0]  sub_q;
  label_t      label_q;
  level_t      mod_levels [CELLS];
  logic [11:0] mod_out_q;

  sense_sweep #(.N_CELLS(4*G)) u_sense (
    .clk, .rst_n, .sweep_start, .step_valid, .step_idx, .discharged,
    .q(sq), .defect(sdef)
  );

  tcm_modulator u_mod (.subset(sub_q), .label(label_q), .levels(mod_levels));

  // latch-group writes: bus, array first-page load and modulator write-back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < G; g++) begin
        data_mem[g] <= '0;
        par_mem[g]  <= 1'b0;
        lvl_mem[g]  <= '0;
      end
    end else begin
      if (bus_we) begin
        if (bus_wmask[0]) data_mem[bus_addr][3:0] <= bus_wdata[3:0];
        if (bus_wmask[1]) data_mem[bus_addr][7:4] <= bus_wdata[7:4];
      end
      if (bus_pwe) begin
        par_mem[bus_paddr] <= bus_wpar;
        if (bus_lvl_we)
          for (int c = 0; c < CELLS; c++) lvl_mem[bus_paddr][3*c +: 3] <= bus_wlvl[c];
      end
      if (arr_page1_we) data_mem[arr_addr][3:0] <= arr_page1;
      if (state_q == S_STORE) lvl_mem[grp_q] <= mod_out_q;
    end
  end

  // three-step modulation sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      grp_q     <= '0;
      sub_q     <= '0;
      label_q   <= '0;
      mod_out_q <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (mod_start) begin
          grp_q   <= '0;
          state_q <= S_LOAD;
        end
        S_LOAD: begin
          sub_q   <= {par_mem[grp_q], data_mem[grp_q][5:4]};
          label_q <= {data_mem[grp_q][7:6], data_mem[grp_q][3:0]};
          state_q <= S_MOD;
        end
        S_MOD: begin
          for (int c = 0; c < CELLS; c++) mod_out_q[3*c +: 3] <= mod_levels[c];
          state_q <= S_STORE;
        end
        default: begin  // S_STORE
          if (grp_q == AW'(G - 1)) state_q <= S_IDLE;
          else begin
            grp_q   <= grp_q + 1'b1;
            state_q <= S_LOAD;
          end
        end
      endcase
    end
  end

  assign mod_busy = (state_q != S_IDLE);
  assign mod_done = (state_q == S_STORE) && (grp_q == AW'(G - 1));

  assign bus_rdata = data_mem[bus_raddr];
  assign arr_bits  = data_mem[arr_addr][3:0];
  always_comb begin
    for (int c = 0; c < CELLS; c++) begin
      bus_rq[c]      = sq[4 * int'(bus_raddr) + c];
      bus_rdefect[c] = sdef[4 * int'(bus_raddr) + c];
      arr_levels[c]  = lvl_mem[arr_addr][3*c +: 3];
    end
  end

  // the bus switches are off while modulating: no bus writes then
  a_no_write_while_modulating: assert property (@(posedge clk) disable iff (!rst_n)
    mod_busy |-> !(bus_we || bus_pwe));

endmodule
