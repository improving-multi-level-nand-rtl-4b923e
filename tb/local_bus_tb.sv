// local_bus_tb: drives one local bus through the programming and read flows.
// Size M=4, G=64 is one of the four local buses of a 512 B page (16
// modulators of 64 groups).
//  1. multi-page, last page: first-page bits come from the array side, the
//     second page is written over the bus with encoding on; one modulation
//     pass (switches open, 3*G cycles) must give the reference TCM levels.
//  2. the cells are "programmed" with those levels plus noise, large offsets
//     and defective cells, sensed through the sweep, and read back through
//     the TCM decoder for each page; defect-free groups must match exactly.
//  3. single-page: whole bytes written with in-line encoding; the levels are
//     in the latch groups without a modulation pass.
//  4. first page alone: written without encoding, offered to the array as
//     plain bits, and read back raw through the bypass.
module local_bus_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 4, G = 64, DEPTH = 20;
  localparam int NG = M * G;
  localparam int GW = 6, AW = 8;
  localparam int SPACE = 6;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_encode = 0, wr_inline = 0;
  logic [AW-1:0] wr_addr = 0;
  gbyte_t wr_data = 0;
  logic [1:0] wr_mask = 0;
  logic mod_start = 0, mod_busy, mod_done;
  logic rd_start = 0, rd_bypass = 0, rd_busy, out_valid, switch_on;
  logic [1:0] rd_page = 0;
  gbyte_t out_data;
  logic [3:0] out_nib;
  logic [GW-1:0] arr_addr [M];
  level_t arr_levels [M][CELLS];
  logic [3:0] arr_bits [M];
  logic arr_page1_we [M];
  logic [3:0] arr_page1 [M];
  logic sweep_start = 0, step_valid = 0;
  logic [3:0] step_idx = 0;
  logic [4*G-1:0] discharged [M];
  int checks = 0, failures = 0;

  local_bus #(.M(M), .G(G), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int data [NG];
  int lvl [NG][4];
  int v [NG][4];
  bit bad [NG][4];
  bit gbad [NG];
  int got [NG];
  int got_nib [NG];
  int n_out;

  always @(posedge clk) if (out_valid) begin
    if (n_out < NG) begin
      got[n_out] = int'(out_data);
      got_nib[n_out] = int'(out_nib);
    end
    n_out++;
  end

  task automatic write_group(int a, int d, logic [1:0] mask, logic enc, logic inl = 0);
    @(negedge clk);
    wr_valid = 1; wr_addr = AW'(a); wr_data = gbyte_t'(d); wr_mask = mask; wr_encode = enc;
    wr_inline = inl;
    @(negedge clk);
    wr_valid = 0; wr_encode = 0; wr_inline = 0;
  endtask

  task automatic modulate_and_check(string what, bit run_pass = 1);
    int cycles;
    enc_t e;
    @(negedge clk);
    mod_start = run_pass;
    @(negedge clk);
    mod_start = 0;
    cycles = 0;
    if (run_pass) while (mod_busy) begin
      checks++;
      if (switch_on) begin
        failures++;
        $display("%s: bus switches closed during modulation", what);
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != (run_pass ? 3 * G : 0)) begin
      failures++;
      $display("%s: modulation took %0d cycles, expected %0d", what, cycles, 3 * G);
    end
    enc_reset(e);
    for (int a = 0; a < NG; a++) begin
      int lv [4];
      ref_encode(e, data[a], lv);
      arr_addr[a / G] = GW'(a % G);
      #1;
      for (int c = 0; c < 4; c++) begin
        lvl[a][c] = lv[c];
        checks++;
        if (int'(arr_levels[a / G][c]) != lv[c]) begin
          failures++;
          $display("%s: group %0d cell %0d level %0d exp %0d", what, a, c, arr_levels[a / G][c], lv[c]);
        end
      end
    end
  endtask

  task automatic sense_page();
    for (int a = 0, last = -SPACE; a < NG; a++) begin
      int bc, dc;
      // single disturbances, kept SPACE groups apart and off the end
      bc = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 3) : -1;
      dc = ($urandom_range(0, 15) == 0) ? $urandom_range(0, 3) : -1;
      if (a - last < SPACE || a >= NG - SPACE) begin bc = -1; dc = -1; end
      if (bc >= 0 || dc >= 0) last = a;
      gbad[a] = (dc >= 0);
      for (int c = 0; c < 4; c++) begin
        v[a][c] = 32 * lvl[a][c] + $urandom_range(0, 10) - 5;
        if (c == bc && dc < 0) v[a][c] += ($urandom_range(0, 1) != 0) ? 19 : -19;
        bad[a][c] = (c == dc);
      end
    end
    @(negedge clk);
    sweep_start = 1;
    @(negedge clk);
    sweep_start = 0;
    for (int s = 0; s < 16; s++) begin
      step_valid = 1; step_idx = 4'(s);
      for (int a = 0; a < NG; a++)
        for (int c = 0; c < 4; c++)
          discharged[a / G][4 * (a % G) + c] = !bad[a][c] && ((s == 15) || (v[a][c] < 10 * s - 6));
      @(negedge clk);
    end
    step_valid = 0;
  endtask

  task automatic read_page(int page, bit bypass, string what);
    int cycles;
    n_out = 0;
    @(negedge clk);
    rd_start = 1; rd_page = 2'(page); rd_bypass = bypass;
    @(negedge clk);
    rd_start = 0;
    cycles = 1;
    while (rd_busy) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (n_out != NG) begin
      failures++;
      $display("%s: %0d bytes, expected %0d", what, n_out, NG);
    end
    checks++;
    if (cycles != (bypass ? NG + 2 : NG + DEPTH + 2)) begin
      failures++;
      $display("%s: read took %0d cycles", what, cycles);
    end
    for (int a = 0; a < NG; a++) begin
      int expn;
      if (!bypass && gbad[a]) continue;
      expn = (page == 2) ? (data[a] >> 4) : (data[a] & 15);
      checks++;
      if (got[a] != data[a] || got_nib[a] != expn) begin
        failures++;
        $display("%s: group %0d got %02x/%x exp %02x/%x", what, a, got[a], got_nib[a], data[a], expn);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < M; s++) begin
      arr_addr[s] = '0; arr_page1_we[s] = 0; arr_page1[s] = '0; discharged[s] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. multi-page: first page from the cells, last page from the host
    for (int a = 0; a < NG; a++) data[a] = $urandom_range(0, 255);
    for (int a = 0; a < NG; a++) begin
      @(negedge clk);
      arr_page1_we[a / G] = 1; arr_addr[a / G] = GW'(a % G); arr_page1[a / G] = 4'(data[a]);
      @(negedge clk);
      arr_page1_we[a / G] = 0;
    end
    for (int a = 0; a < NG; a++) write_group(a, (data[a] & 8'hf0) | $urandom_range(0, 15), 2'b10, 1);
    modulate_and_check("multi-page");
    // 2. TCM-decoded reads of both pages
    sense_page();
    read_page(1, 0, "read page 1");
    read_page(2, 0, "read page 2");

    // 3. single-page programming, encoded in line (no modulation pass)
    for (int a = 0; a < NG; a++) data[a] = $urandom_range(0, 255);
    for (int a = 0; a < NG; a++) write_group(a, data[a], 2'b11, 1, 1);
    modulate_and_check("single-page", 0);
    sense_page();
    read_page(0, 0, "single-page read");

    // 4. first page only, read without TCM
    for (int a = 0; a < NG; a++) begin
      data[a] = (data[a] & 8'hf0) | $urandom_range(0, 15);
      write_group(a, data[a], 2'b01, 0);
    end
    for (int a = 0; a < NG; a++) begin
      arr_addr[a / G] = GW'(a % G);
      #1;
      checks++;
      if (int'(arr_bits[a / G]) != (data[a] & 15)) begin
        failures++;
        $display("group %0d first-page bits %x exp %x", a, arr_bits[a / G], data[a] & 15);
      end
    end
    read_page(1, 1, "bypass read");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
