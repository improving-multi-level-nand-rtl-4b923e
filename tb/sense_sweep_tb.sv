// sense_sweep_tb: cells with random threshold voltages, some of them
// defective, go through the 16-step word-line sweep of a bit-line model;
// the latched bins and defect flags are compared with the reference bins.
module sense_sweep_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 40;

  logic clk = 0, rst_n = 0;
  logic sweep_start = 0, step_valid = 0;
  logic [3:0] step_idx = 0;
  logic [N-1:0] discharged = '0;
  q_t q [N];
  logic [N-1:0] defect;
  int checks = 0, failures = 0;

  sense_sweep #(.N_CELLS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int v [N];
  bit bad [N];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < N; i++) begin
        v[i]   = $urandom_range(0, 175) - 25;   // -25/32 .. 150/32 level
        bad[i] = ($urandom_range(0, 9) == 0);
      end
      @(negedge clk);
      sweep_start = 1;
      @(negedge clk);
      sweep_start = 0;
      for (int s = 0; s < 16; s++) begin
        step_valid = 1;
        step_idx = 4'(s);
        for (int i = 0; i < N; i++)
          // a healthy cell conducts once the word-line passes its threshold
          // (threshold of step s at 10*s - 6); at step 15 every healthy one
          discharged[i] = !bad[i] && ((s == 15) || (v[i] < 10 * s - 6));
        @(negedge clk);
      end
      step_valid = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        int exp;
        exp = bad[i] ? 15 : ref_sense(v[i]);
        checks++;
        if (int'(q[i]) != exp || defect[i] != bad[i]) begin
          failures++;
          $display("round %0d cell %0d v=%0d: q %0d def %0d, exp %0d %0d", r, i, v[i], q[i], defect[i], exp, bad[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
