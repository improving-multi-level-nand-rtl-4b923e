// demod_1d_tb: every sensing bin, with and without erasure, against a
// brute-force search over the levels of E and F.
module demod_1d_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  q_t      q;
  logic    erase;
  demod1_t res;
  int checks = 0, failures = 0;

  demod_1d dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int b = 0; b < 16; b++) begin
        int me, le, mf, lf;
        q = q_t'(b);
        erase = e[0];
        #1;
        me = 1 << 30; mf = 1 << 30; le = 0; lf = 0;
        for (int l = 0; l < 5; l++) begin
          if (l % 2 == 0 && ref_d2(b, l) < me) begin me = ref_d2(b, l); le = l; end
          if (l % 2 == 1 && ref_d2(b, l) < mf) begin mf = ref_d2(b, l); lf = l; end
        end
        if (e) begin me = 0; mf = 0; le = 2; lf = 1; end
        checks++;
        if (int'(res.me) != me || int'(res.le) != le || int'(res.mf) != mf || int'(res.lf) != lf) begin
          failures++;
          $display("q=%0d erase=%0d got E(%0d,%0d) F(%0d,%0d) exp E(%0d,%0d) F(%0d,%0d)",
                   b, e, res.me, res.le, res.mf, res.lf, me, le, mf, lf);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
