// tcm_modulator_tb: all 512 (subset, label) inputs against the enumerated
// constellation; also checks that each subset's 64 points are distinct.
module tcm_modulator_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  logic [2:0] subset;
  label_t     label;
  level_t     levels [CELLS];
  int checks = 0, failures = 0;

  tcm_modulator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv [4];
    bit seen [625];
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < 625; i++) seen[i] = 0;
      for (int k = 0; k < 64; k++) begin
        int code;
        subset = 3'(p);
        label  = label_t'(k);
        #1;
        ref_mod(p, k, lv);
        checks++;
        code = 0;
        for (int c = 0; c < 4; c++) begin
          if (int'(levels[c]) != lv[c]) begin
            failures++;
            $display("P%0d k=%0d cell %0d got %0d exp %0d", p + 1, k, c, levels[c], lv[c]);
            break;
          end
          code = code * 5 + int'(levels[c]);
        end
        checks++;
        if (seen[code]) begin
          failures++;
          $display("P%0d k=%0d duplicate point", p + 1, k);
        end
        seen[code] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
