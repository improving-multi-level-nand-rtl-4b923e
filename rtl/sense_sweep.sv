// sense_sweep: sense latches with on-the-fly defect detection.
//
// During a read the selected word-line is swept upward through the 15
// quantization thresholds (steps 0..14) and then, as one extra last step
// (step 15), to the pass voltage V_unsel that turns on every healthy cell.
// For each cell the latch records the first threshold step at which its
// bit-line discharges; that step number is the 4-bit quantization bin q, and
// a cell that never discharges below the last threshold reads q = 15. A
// bit-line that still fails to discharge at the V_unsel step marks its cell
// as defective, so that the TCM demodulator erases it. The extra sweep step
// and the defect rule follow the design; the step numbering and latch
// behaviour are this design's choices.
//
// Interface: sweep_start clears all latches (q = 15, no defect); each
// step_valid cycle presents step_idx and the bit-line discharge results of
// all N_CELLS cells; results are registered and hold until the next sweep.
module sense_sweep
  import tcm_pkg::*;
#(
  parameter int unsigned N_CELLS = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sweep_start,
  input  logic               step_valid,
  input  logic [3:0]         step_idx,
  input  logic [N_CELLS-1:0] discharged,
  output q_t                 q      [N_CELLS],
  output logic [N_CELLS-1:0] defect
);

  localparam logic [3:0] UNSEL_STEP = 4'd15;

  logic [N_CELLS-1:0] on_q;   // cell has already conducted

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on_q   <= '0;
      defect <= '0;
      for (int i = 0; i < N_CELLS; i++) q[i] <= 4'd15;
    end else if (sweep_start) begin
      on_q   <= '0;
      defect <= '0;
      for (int i = 0; i < N_CELLS; i++) q[i] <= 4'd15;
    end else if (step_valid) begin
      if (step_idx == UNSEL_STEP) begin
        defect <= ~discharged;
      end else begin
        for (int i = 0; i < N_CELLS; i++) begin
          if (discharged[i] && !on_q[i]) begin
            on_q[i] <= 1'b1;
            q[i]    <= step_idx;
          end
        end
      end
    end
  end

endmodule
