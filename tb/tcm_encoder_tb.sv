// tcm_encoder_tb: streams random group bytes through the encoder and checks
// each group's four levels and parity, one cycle after input, against the
// reference.
module tcm_encoder_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  gbyte_t in_data = 0;
  logic out_valid;
  level_t out_levels [CELLS];
  logic out_parity;
  int checks = 0, failures = 0;
  enc_t ref_e;
  int exp_par;

  tcm_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv [4];
    int exp [4];
    bit exp_valid;
    enc_reset(ref_e);
    exp_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      // outputs of the previous cycle's input
      checks++;
      if (out_valid != exp_valid) begin
        failures++;
        $display("n=%0d out_valid %0d exp %0d", n, out_valid, exp_valid);
      end else if (exp_valid) begin
        checks++;
        if (int'(out_parity) != exp_par) begin
          failures++;
          $display("n=%0d parity %0d exp %0d", n, out_parity, exp_par);
        end
        for (int c = 0; c < 4; c++) if (int'(out_levels[c]) != exp[c]) begin
          failures++;
          $display("n=%0d cell %0d got %0d exp %0d", n, c, out_levels[c], exp[c]);
          break;
        end
      end
      in_valid = ($urandom_range(0, 5) != 0);
      in_first = (n % 200 == 0);
      in_data  = 8'($urandom);
      exp_valid = in_valid;
      if (in_valid) begin
        if (in_first) enc_reset(ref_e);
        begin
          enc_t pe;
          pe = ref_e;
          exp_par = (enc_step(pe, int'(in_data[5:4])) >> 2) & 1;
        end
        ref_encode(ref_e, int'(in_data), lv);
        exp = lv;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
