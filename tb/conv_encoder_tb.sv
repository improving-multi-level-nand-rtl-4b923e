// conv_encoder_tb: checks the rate-2/3 encoder against the parity recursion
// of the reference model over random pages, including page restarts.
module conv_encoder_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  logic [1:0] u = 0;
  logic [2:0] subset;
  logic parity;
  int checks = 0, failures = 0;
  enc_t ref_e;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    enc_reset(ref_e);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      in_first = (n % 150 == 0);
      u = 2'($urandom);
      #1;
      if (in_valid) begin
        if (in_first) enc_reset(ref_e);
        exp = enc_step(ref_e, int'(u));
        checks++;
        if (subset != 3'(exp) || parity != subset[2]) begin
          failures++;
          $display("mismatch n=%0d u=%0d got %0d exp %0d", n, u, subset, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
