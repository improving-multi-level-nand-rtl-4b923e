// bus_segment_tb: writes groups over the bus port, loads first-page bits from
// the array side, runs one modulation pass and checks its length (3 cycles
// per group) and every group's levels; writes one group's levels through the
// in-line write-back port; then runs a sensing sweep and checks
// the bins and defect flags read back over the bus.
module bus_segment_tb;
  import tcm_pkg::*;
  import tb_ref_pkg::*;

  localparam int G  = 8;
  localparam int AW = 3;

  logic clk = 0, rst_n = 0;
  logic bus_we = 0, bus_pwe = 0, bus_wpar = 0, bus_lvl_we = 0;
  logic [AW-1:0] bus_addr = 0, bus_paddr = 0, bus_raddr = 0, arr_addr = 0;
  level_t bus_wlvl [CELLS] = '{default: 0};
  gbyte_t bus_wdata = 0, bus_rdata;
  logic [1:0] bus_wmask = 0;
  q_t bus_rq [CELLS];
  logic bus_rdefect [CELLS];
  logic mod_start = 0, mod_busy, mod_done;
  level_t arr_levels [CELLS];
  logic [3:0] arr_bits;
  logic arr_page1_we = 0;
  logic [3:0] arr_page1 = 0;
  logic sweep_start = 0, step_valid = 0;
  logic [3:0] step_idx = 0;
  logic [4*G-1:0] discharged = '0;
  int checks = 0, failures = 0;

  bus_segment #(.G(G)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int data [G];
  int par [G];
  int v [4*G];
  bit bad [4*G];

  initial begin
    int cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first-page bits from the array, second page with parity over the bus
    for (int g = 0; g < G; g++) begin
      data[g] = $urandom_range(0, 255);
      par[g]  = $urandom_range(0, 1);
      @(negedge clk);
      arr_page1_we = 1; arr_addr = AW'(g); arr_page1 = 4'(data[g]);
      @(negedge clk);
      arr_page1_we = 0;
      bus_we = 1; bus_addr = AW'(g); bus_wmask = 2'b10;
      bus_wdata = {4'(data[g] >> 4), 4'($urandom)};
      bus_pwe = 1; bus_paddr = AW'(g); bus_wpar = par[g][0];
    end
    @(negedge clk);
    bus_we = 0; bus_pwe = 0;
    for (int g = 0; g < G; g++) begin
      bus_raddr = AW'(g);
      arr_addr = AW'(g);
      #1;
      checks++;
      if (int'(arr_bits) != (data[g] & 15)) begin
        failures++;
        $display("group %0d first-page bits %x exp %x", g, arr_bits, data[g] & 15);
      end
      checks++;
      if (int'(bus_rdata) != data[g]) begin
        failures++;
        $display("group %0d data %02x exp %02x", g, bus_rdata, data[g]);
      end
    end
    // modulation pass
    @(negedge clk);
    mod_start = 1;
    @(negedge clk);
    mod_start = 0;
    cycles = 0;
    while (mod_busy) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 3 * G) begin
      failures++;
      $display("modulation took %0d cycles, expected %0d", cycles, 3 * G);
    end
    for (int g = 0; g < G; g++) begin
      int lv [4];
      int p, k;
      p = par[g] * 4 + ((data[g] >> 4) & 3);
      k = ((data[g] >> 6) & 3) * 16 + (data[g] & 15);
      ref_mod(p, k, lv);
      arr_addr = AW'(g);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(arr_levels[c]) != lv[c]) begin
          failures++;
          $display("group %0d cell %0d level %0d exp %0d", g, c, arr_levels[c], lv[c]);
        end
      end
    end
    // in-line levels written through the write-back port
    begin
      int lv [4];
      for (int c = 0; c < 4; c++) begin lv[c] = $urandom_range(0, 4); bus_wlvl[c] = level_t'(lv[c]); end
      @(negedge clk);
      bus_pwe = 1; bus_lvl_we = 1; bus_paddr = AW'(G - 3);
      @(negedge clk);
      bus_pwe = 0; bus_lvl_we = 0;
      arr_addr = AW'(G - 3);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(arr_levels[c]) != lv[c]) begin
          failures++;
          $display("in-line level cell %0d: %0d exp %0d", c, arr_levels[c], lv[c]);
        end
      end
    end
    // sensing sweep
    for (int i = 0; i < 4 * G; i++) begin
      v[i] = $urandom_range(0, 150) - 10;
      bad[i] = ($urandom_range(0, 7) == 0);
    end
    @(negedge clk);
    sweep_start = 1;
    @(negedge clk);
    sweep_start = 0;
    for (int s = 0; s < 16; s++) begin
      step_valid = 1; step_idx = 4'(s);
      for (int i = 0; i < 4 * G; i++)
        discharged[i] = !bad[i] && ((s == 15) || (v[i] < 10 * s - 6));
      @(negedge clk);
    end
    step_valid = 0;
    for (int g = 0; g < G; g++) begin
      bus_raddr = AW'(g);
      #1;
      for (int c = 0; c < 4; c++) begin
        int exp;
        exp = bad[4*g+c] ? 15 : ref_sense(v[4*g+c]);
        checks++;
        if (int'(bus_rq[c]) != exp || bus_rdefect[c] != bad[4*g+c]) begin
          failures++;
          $display("group %0d cell %0d q %0d exp %0d", g, c, bus_rq[c], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
