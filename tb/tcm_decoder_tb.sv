// tcm_decoder_tb: end-to-end TCM decoding from sensing bins. Random pages
// are encoded by the reference, cell voltages get small noise, some cells a
// large offset, and some cells are defective (read at the top bin, flagged).
// Disturbances are isolated (one per SPACE groups). Every group without a
// defective cell must decode exactly; groups holding a
// defective cell are left to the outer code and not compared.
module tcm_decoder_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  localparam int DEPTH = 20;
  localparam int NG    = 512;
  localparam int SPACE = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, in_ready;
  q_t   q      [CELLS];
  logic defect [CELLS];
  logic out_valid;
  gbyte_t out_data;
  int checks = 0, failures = 0;

  tcm_decoder #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int data [NG];
  int qs [NG][4];
  bit dfs [NG][4];
  bit has_def [NG];
  int out_cnt = 0, n_def = 0, n_hard = 0;

  always @(posedge clk) if (out_valid) begin
    if (out_cnt < NG && !has_def[out_cnt]) begin
      checks++;
      if (int'(out_data) != data[out_cnt]) begin
        failures++;
        $display("byte %0d got %02x exp %02x", out_cnt, out_data, data[out_cnt]);
      end
    end
    out_cnt++;
  end

  initial begin
    enc_t e;
    int last = -SPACE;
    enc_reset(e);
    for (int n = 0; n < NG; n++) begin
      int lv [4];
      int bad, dcell;
      data[n] = $urandom_range(0, 255);
      ref_encode(e, data[n], lv);
      // single disturbances, kept SPACE groups apart and off the end
      bad   = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 3) : -1;
      dcell = ($urandom_range(0, 24) == 0) ? $urandom_range(0, 3) : -1;
      if (n - last < SPACE || n >= NG - SPACE) begin bad = -1; dcell = -1; end
      if (bad >= 0 || dcell >= 0) last = n;
      has_def[n] = (dcell >= 0);
      if (dcell >= 0) n_def++;
      for (int c = 0; c < 4; c++) begin
        int v;
        v = 32 * lv[c] + $urandom_range(0, 10) - 5;
        if (c == bad && dcell < 0) begin
          v += ($urandom_range(0, 1) != 0) ? 19 : -19;
          n_hard++;
        end
        qs[n][c]  = (c == dcell) ? 15 : ref_sense(v);
        dfs[n][c] = (c == dcell);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NG; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_first = (n == 0);
      in_last  = (n == NG - 1);
      for (int c = 0; c < 4; c++) begin
        q[c] = q_t'(qs[n][c]);
        defect[c] = dfs[n][c];
      end
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    repeat (DEPTH + 5) @(negedge clk);
    checks++;
    if (out_cnt != NG) begin
      failures++;
      $display("%0d bytes out, expected %0d", out_cnt, NG);
    end
    checks++;
    if (n_def == 0 || n_hard == 0) begin
      failures++;
      $display("stimulus produced no defect or no large offset");
    end
    $display("groups with a defective cell: %0d, large offsets: %0d", n_def, n_hard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
