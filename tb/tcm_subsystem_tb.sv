// tcm_subsystem_tb: end-to-end run of the whole sub-system at its default
// size (4 local buses x 32 segments x 64 groups = 8192 groups, 32768 cells).
// All local buses work in parallel, each on its own data:
//   * multi-page programming of the last page: first-page bits loaded from
//     the array side, second page written with encoding, one modulation pass
//     of 3*64 cycles with the bus switches open; levels checked;
//   * cells programmed with those levels, disturbed (noise, large offsets in
//     single cells, about one defective cell in 64 groups) and sensed with
//     the word-line sweep including the V_unsel step;
//   * TCM-decoded reads of both pages: every defect-free group must be
//     recovered, at one group per clock per local bus;
//   * single-page programming with in-line encoding (no modulation pass)
//     and its read; a first page on its own, offered to the array as plain
//     bits and read back through the bypass.
// Each mechanism is counted and must have occurred at least once.
module tcm_subsystem_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB = 4, M = 32, G = 64, DEPTH = 20;
  localparam int NG = M * G;
  localparam int GW = 6, AW = 11;
  localparam int SPACE = 6;

  logic clk = 0, rst_n = 0;
  logic          wr_valid  [NB];
  logic [AW-1:0] wr_addr   [NB];
  gbyte_t        wr_data   [NB];
  logic [1:0]    wr_mask   [NB];
  logic          wr_encode [NB];
  logic          wr_inline [NB];
  logic          mod_start [NB];
  logic          mod_busy  [NB];
  logic          mod_done  [NB];
  logic          rd_start  [NB];
  logic [1:0]    rd_page   [NB];
  logic          rd_bypass [NB];
  logic          rd_busy   [NB];
  logic          out_valid [NB];
  gbyte_t        out_data  [NB];
  logic [3:0]    out_nib   [NB];
  logic          switch_on [NB];
  logic [GW-1:0] arr_addr     [NB][M];
  level_t        arr_levels   [NB][M][CELLS];
  logic [3:0]    arr_bits     [NB][M];
  logic          arr_page1_we [NB][M];
  logic [3:0]    arr_page1    [NB][M];
  logic          sweep_start = 0, step_valid = 0;
  logic [3:0]    step_idx = 0;
  logic [4*G-1:0] discharged [NB][M];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_encoded = 0, n_mod_pass = 0, n_switch_open = 0, n_defect = 0;
  int n_corrected = 0, n_tcm_read = 0, n_bypass = 0, n_single = 0, n_plain = 0;

  tcm_subsystem dut (.*);

  always #4 clk = ~clk;   // 8 ns period

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int data [NB][NG];
  int lvl  [NB][NG][4];
  int v    [NB][NG][4];
  bit bad  [NB][NG][4];
  bit gbad [NB][NG];
  bit hard_err [NB][NG];
  int got  [NB][NG];
  int got_nib [NB][NG];
  int n_out [NB];

  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) if (out_valid[b]) begin
      if (n_out[b] < NG) begin
        got[b][n_out[b]] = int'(out_data[b]);
        got_nib[b][n_out[b]] = int'(out_nib[b]);
      end
      n_out[b]++;
    end
  end

  task automatic write_all(logic [1:0] mask, logic enc, logic inl = 0);
    for (int a = 0; a < NG; a++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        wr_valid[b] = 1; wr_addr[b] = AW'(a); wr_mask[b] = mask; wr_encode[b] = enc;
        wr_inline[b] = inl;
        wr_data[b] = gbyte_t'(data[b][a]);
        if (mask == 2'b10) wr_data[b][3:0] = 4'($urandom);   // not written
      end
      if (enc) n_encoded += NB;
    end
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin wr_valid[b] = 0; wr_encode[b] = 0; wr_inline[b] = 0; end
  endtask

  task automatic modulate_and_check(string what, bit run_pass = 1);
    int cycles;
    @(negedge clk);
    for (int b = 0; b < NB; b++) mod_start[b] = run_pass;
    @(negedge clk);
    for (int b = 0; b < NB; b++) mod_start[b] = 0;
    cycles = 0;
    if (run_pass) while (mod_busy[0]) begin
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (switch_on[b] || !mod_busy[b]) begin
          failures++;
          $display("%s: bus %0d switches closed or idle during modulation", what, b);
        end else n_switch_open++;
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != (run_pass ? 3 * G : 0)) begin
      failures++;
      $display("%s: modulation took %0d cycles, expected %0d", what, cycles, 3 * G);
    end else if (run_pass) n_mod_pass++;
    for (int b = 0; b < NB; b++) begin
      enc_t e;
      enc_reset(e);
      for (int a = 0; a < NG; a++) begin
        int lv [4];
        ref_encode(e, data[b][a], lv);
        for (int c = 0; c < 4; c++) lvl[b][a][c] = lv[c];
      end
    end
    for (int g = 0; g < G; g++) begin
      for (int b = 0; b < NB; b++) for (int s = 0; s < M; s++) arr_addr[b][s] = GW'(g);
      #1;
      for (int b = 0; b < NB; b++) for (int s = 0; s < M; s++) begin
        int a = s * G + g;
        checks++;
        for (int c = 0; c < 4; c++) if (int'(arr_levels[b][s][c]) != lvl[b][a][c]) begin
          failures++;
          $display("%s: bus %0d group %0d cell %0d level %0d exp %0d", what, b, a, c,
                   arr_levels[b][s][c], lvl[b][a][c]);
          break;
        end
      end
    end
  endtask

  task automatic sense_all();
    for (int b = 0; b < NB; b++) for (int a = 0, last = -SPACE; a < NG; a++) begin
      int bc, dc;
      // disturbances are kept SPACE groups apart and off the unterminated
      // end of the trellis, where single events are within the inner code's
      // reach; denser errors are left to the outer code
      bc = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 3) : -1;
      dc = ($urandom_range(0, 63) == 0) ? $urandom_range(0, 3) : -1;
      if (a - last < SPACE || a >= NG - SPACE) begin bc = -1; dc = -1; end
      if (bc >= 0 || dc >= 0) last = a;
      gbad[b][a] = (dc >= 0);
      hard_err[b][a] = 0;
      for (int c = 0; c < 4; c++) begin
        v[b][a][c] = 32 * lvl[b][a][c] + $urandom_range(0, 10) - 5;
        if (c == bc && dc < 0) v[b][a][c] += ($urandom_range(0, 1) != 0) ? 19 : -19;
        bad[b][a][c] = (c == dc);
        // nearest level of the cell on its own differs from the stored one
        if (!bad[b][a][c] && (v[b][a][c] + 16) / 32 != lvl[b][a][c]) hard_err[b][a] = 1;
      end
    end
    @(negedge clk);
    sweep_start = 1;
    @(negedge clk);
    sweep_start = 0;
    for (int st = 0; st < 16; st++) begin
      step_valid = 1; step_idx = 4'(st);
      for (int b = 0; b < NB; b++) for (int a = 0; a < NG; a++) for (int c = 0; c < 4; c++)
        discharged[b][a / G][4 * (a % G) + c] =
          !bad[b][a][c] && ((st == 15) || (v[b][a][c] < 10 * st - 6));
      @(negedge clk);
    end
    step_valid = 0;
  endtask

  task automatic read_all(int page, bit bypass, string what);
    int cycles;
    for (int b = 0; b < NB; b++) n_out[b] = 0;
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin rd_start[b] = 1; rd_page[b] = 2'(page); rd_bypass[b] = bypass; end
    @(negedge clk);
    for (int b = 0; b < NB; b++) rd_start[b] = 0;
    cycles = 1;
    while (rd_busy[0]) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    // one group per clock per local bus, plus the decoder's pipeline
    if (cycles != (bypass ? NG + 2 : NG + DEPTH + 2)) begin
      failures++;
      $display("%s: read took %0d cycles", what, cycles);
    end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (n_out[b] != NG) begin
        failures++;
        $display("%s: bus %0d gave %0d bytes", what, b, n_out[b]);
      end
      for (int a = 0; a < NG; a++) begin
        int expn;
        if (!bypass && gbad[b][a]) begin
          n_defect++;
          continue;
        end
        expn = (page == 2) ? (data[b][a] >> 4) : (data[b][a] & 15);
        checks++;
        if (got[b][a] != data[b][a] || got_nib[b][a] != expn) begin
          failures++;
          if (failures < 20)
            $display("%s: bus %0d group %0d got %02x/%x exp %02x/%x", what, b, a,
                     got[b][a], got_nib[b][a], data[b][a], expn);
        end else if (!bypass && hard_err[b][a]) n_corrected++;
      end
    end
    if (bypass) n_bypass++; else n_tcm_read++;
  endtask

  task automatic require(int count, string name);
    checks++;
    $display("%-34s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      wr_valid[b] = 0; wr_addr[b] = '0; wr_data[b] = '0; wr_mask[b] = '0; wr_encode[b] = 0;
      wr_inline[b] = 0;
      mod_start[b] = 0; rd_start[b] = 0; rd_page[b] = '0; rd_bypass[b] = 0;
      for (int s = 0; s < M; s++) begin
        arr_addr[b][s] = '0; arr_page1_we[b][s] = 0; arr_page1[b][s] = '0; discharged[b][s] = '0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // multi-page programming of the last page
    for (int b = 0; b < NB; b++) for (int a = 0; a < NG; a++) data[b][a] = $urandom_range(0, 255);
    for (int g = 0; g < G; g++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) for (int s = 0; s < M; s++) begin
        arr_page1_we[b][s] = 1; arr_addr[b][s] = GW'(g); arr_page1[b][s] = 4'(data[b][s * G + g]);
      end
    end
    @(negedge clk);
    for (int b = 0; b < NB; b++) for (int s = 0; s < M; s++) arr_page1_we[b][s] = 0;
    write_all(2'b10, 1);
    modulate_and_check("multi-page");
    sense_all();
    read_all(1, 0, "TCM read, first page");
    read_all(2, 0, "TCM read, last page");

    // single-page programming
    for (int b = 0; b < NB; b++) for (int a = 0; a < NG; a++) data[b][a] = $urandom_range(0, 255);
    write_all(2'b11, 1, 1);
    modulate_and_check("single-page", 0);
    n_single++;
    sense_all();
    read_all(0, 0, "TCM read, single page");

    // first page before the last page exists: no TCM
    for (int b = 0; b < NB; b++) for (int a = 0; a < NG; a++)
      data[b][a] = (data[b][a] & 8'hf0) | $urandom_range(0, 15);
    write_all(2'b01, 0);
    for (int g = 0; g < G; g++) begin
      for (int b = 0; b < NB; b++) for (int s = 0; s < M; s++) arr_addr[b][s] = GW'(g);
      #1;
      for (int b = 0; b < NB; b++) for (int s = 0; s < M; s++) begin
        checks++;
        if (int'(arr_bits[b][s]) != (data[b][s * G + g] & 15)) begin
          failures++;
          $display("bus %0d group %0d first-page bits %x", b, s * G + g, arr_bits[b][s]);
        end else n_plain++;
      end
    end
    read_all(1, 1, "bypass read");

    require(n_encoded,     "groups convolutionally encoded");
    require(n_mod_pass,    "parallel modulation passes");
    require(n_switch_open, "cycles with bus switches open");
    require(n_defect,      "groups with an erased cell");
    require(n_corrected,   "groups corrected by the TCM");
    require(n_tcm_read,    "TCM-decoded page reads");
    require(n_single,      "single-page in-line encoded pages");
    require(n_plain,       "plain first-page groups to the array");
    require(n_bypass,      "bypass reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
