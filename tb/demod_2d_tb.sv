// demod_2d_tb: random 1-D results for the two cells of a pair; checks the
// metric and point index of each 2-D subset against direct evaluation.
module demod_2d_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  demod1_t c0, c1;
  demod2_t res [4];
  int checks = 0, failures = 0;

  demod_2d dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int lv0 [2], lv1 [2], m0 [2], m1 [2];
      lv0[0] = 2 * $urandom_range(0, 2); lv0[1] = 2 * $urandom_range(0, 1) + 1;
      lv1[0] = 2 * $urandom_range(0, 2); lv1[1] = 2 * $urandom_range(0, 1) + 1;
      m0[0] = $urandom_range(0, 19321); m0[1] = $urandom_range(0, 19321);
      m1[0] = $urandom_range(0, 19321); m1[1] = $urandom_range(0, 19321);
      c0 = '{me: m1_t'(m0[0]), le: level_t'(lv0[0]), mf: m1_t'(m0[1]), lf: level_t'(lv0[1])};
      c1 = '{me: m1_t'(m1[0]), le: level_t'(lv1[0]), mf: m1_t'(m1[1]), lf: level_t'(lv1[1])};
      #1;
      for (int s = 0; s < 4; s++) begin
        int a [9], b [9];
        int np, expm, expi;
        np = pts2d(s, a, b);
        expm = m0[FIRST[s]] + m1[SECOND[s]];
        expi = -1;
        for (int i = 0; i < np; i++)
          if (a[i] == lv0[FIRST[s]] && b[i] == lv1[SECOND[s]]) expi = i;
        checks++;
        if (int'(res[s].metric) != expm || int'(res[s].idx) != expi) begin
          failures++;
          $display("n=%0d subset %0d got (%0d,%0d) exp (%0d,%0d)", n, s,
                   res[s].metric, res[s].idx, expm, expi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
