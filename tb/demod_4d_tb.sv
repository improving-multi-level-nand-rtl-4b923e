// demod_4d_tb: random sensing results, with and without an erased cell;
// checks all eight subset metrics and labels against brute-force search.
module demod_4d_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  q_t     q     [CELLS];
  logic   erase [CELLS];
  bm_t    bm    [NUM_SUBSETS];
  label_t label [NUM_SUBSETS];
  int checks = 0, failures = 0;

  demod_4d dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int qi [4];
      bit er [4];
      int defect_cell;
      defect_cell = (n % 3 == 0) ? $urandom_range(0, 3) : -1;
      for (int c = 0; c < 4; c++) begin
        qi[c] = $urandom_range(0, 15);
        er[c] = (c == defect_cell);
        q[c] = q_t'(qi[c]);
        erase[c] = er[c];
      end
      #1;
      for (int p = 0; p < 8; p++) begin
        int m, k;
        ref_demod(p, qi, er, m, k);
        checks++;
        if (int'(bm[p]) != m || int'(label[p]) != k) begin
          failures++;
          $display("n=%0d P%0d got (%0d,%0d) exp (%0d,%0d)", n, p + 1, bm[p], label[p], m, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
