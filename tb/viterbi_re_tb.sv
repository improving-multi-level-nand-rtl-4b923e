// viterbi_re_tb: encodes random pages with the reference TCM, disturbs the
// cells (small noise everywhere, a large offset in one cell of some groups),
// forms branch metrics with the brute-force reference demodulator and checks
// that the decoder returns every byte, in order, with the expected latency
// (first byte DEPTH+1 cycles after the first group, last byte DEPTH+1
// cycles after the last group).
module viterbi_re_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  localparam int DEPTH = 20;
  localparam int NG    = 400;   // groups per page
  localparam int PAGES = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, in_ready;
  bm_t    bm    [NUM_SUBSETS];
  label_t label [NUM_SUBSETS];
  logic out_valid;
  gbyte_t out_data;
  int checks = 0, failures = 0;

  viterbi_re #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int data [NG];
  int bms [NG][8];
  int lbs [NG][8];
  int out_cnt, cyc, first_in_cyc, first_out_cyc, last_in_cyc, last_out_cyc;
  int hard_errs;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      if (out_cnt == 0) first_out_cyc = cyc;
      last_out_cyc = cyc;
      checks++;
      if (out_cnt >= NG || int'(out_data) != data[out_cnt]) begin
        failures++;
        $display("byte %0d got %02x exp %02x", out_cnt, out_data, data[out_cnt]);
      end
      out_cnt++;
    end
  end

  initial begin
    enc_t e;
    cyc = 0;
    hard_errs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pg = 0; pg < PAGES; pg++) begin
      int last;
      last = -6;
      enc_reset(e);
      for (int n = 0; n < NG; n++) begin
        int lv [4], qi [4];
        bit er [4];
        int bad;
        data[n] = $urandom_range(0, 255);
        ref_encode(e, data[n], lv);
        // isolated large offsets, at least 6 groups apart and off the end
        bad = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 3) : -1;
        if (n - last < 6 || n >= NG - 6) bad = -1;
        if (bad >= 0) last = n;
        for (int c = 0; c < 4; c++) begin
          int v;
          v = 32 * lv[c] + $urandom_range(0, 10) - 5;
          if (c == bad) v += ($urandom_range(0, 1) != 0) ? 19 : -19;
          qi[c] = ref_sense(v);
          er[c] = 0;
          if (c == bad) hard_errs++;
        end
        for (int p = 0; p < 8; p++) ref_demod(p, qi, er, bms[n][p], lbs[n][p]);
      end
      out_cnt = 0;
      for (int n = 0; n < NG; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_first = (n == 0);
        in_last  = (n == NG - 1);
        for (int p = 0; p < 8; p++) begin
          bm[p] = bm_t'(bms[n][p]);
          label[p] = label_t'(lbs[n][p]);
        end
        checks++;
        if (!in_ready) begin
          failures++;
          $display("not ready while streaming at %0d", n);
        end
        if (n == 0) first_in_cyc = cyc;
        if (n == NG - 1) last_in_cyc = cyc;
      end
      @(negedge clk);
      in_valid = 0; in_last = 0; in_first = 0;
      checks++;
      if (in_ready) begin
        failures++;
        $display("in_ready high during flush");
      end
      repeat (DEPTH + 5) @(negedge clk);
      checks++;
      if (out_cnt != NG) begin
        failures++;
        $display("page %0d: %0d bytes out, expected %0d", pg, out_cnt, NG);
      end
      checks++;
      if (first_out_cyc - first_in_cyc != DEPTH + 1) begin
        failures++;
        $display("latency %0d, expected %0d", first_out_cyc - first_in_cyc, DEPTH + 1);
      end
      checks++;
      if (last_out_cyc - last_in_cyc != DEPTH + 1) begin
        failures++;
        $display("flush end %0d cycles after last input, expected %0d", last_out_cyc - last_in_cyc, DEPTH + 1);
      end
    end
    $display("cells disturbed by a large offset: %0d", hard_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
