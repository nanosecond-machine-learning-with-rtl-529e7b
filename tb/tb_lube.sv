// tb_lube: self-checking testbench of the look up bin engine.
// Part 1 loads thresholds 8, 12, 14 into a 4-bit, 4-bin engine and checks all
// 16 inputs against the example binning (0-7, 8-11, 12-13, 14-15; x=13 gives
// bin 2). Part 2 loads random ascending thresholds (repeats and unused
// all-ones thresholds included) into an engine of the default size and checks
// every x against the count of thresholds <= x.
module tb_lube;
  import fwx_pkg::*;
  import tb_fwx_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              s_we;
  logic [CFG_AW-1:0] s_addr;
  logic [CFG_DW-1:0] s_data;
  logic [3:0]        s_x;
  logic [1:0]        s_b;
  lube #(.N(4), .BW(2)) u_small (
    .clk, .rst_n, .cfg_we(s_we), .cfg_addr(s_addr), .cfg_data(s_data),
    .x(s_x), .b(s_b));

  logic              d_we;
  logic [CFG_AW-1:0] d_addr;
  logic [CFG_DW-1:0] d_data;
  logic [DEF_N-1:0]  d_x;
  logic [DEF_BW-1:0] d_b;
  lube u_dut (
    .clk, .rst_n, .cfg_we(d_we), .cfg_addr(d_addr), .cfg_data(d_data),
    .x(d_x), .b(d_b));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int unsigned small_exp [16] = '{0,0,0,0,0,0,0,0,1,1,1,1,2,2,3,3};
  int unsigned small_thr [3]  = '{8, 12, 14};
  cuts_t c;

  initial begin
    s_we = 0; s_addr = '0; s_data = '0; s_x = '0;
    d_we = 0; d_addr = '0; d_data = '0; d_x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Reset leaves every threshold at all ones.
    d_x = 8'd254; #1; check(d_b, 0, "reset x=254");
    d_x = 8'd255; #1; check(d_b, 7, "reset x=255");

    @(negedge clk);
    s_we = 1;
    for (int k = 0; k < 3; k++) begin
      s_addr = CFG_AW'(k); s_data = CFG_DW'(small_thr[k]); @(negedge clk);
    end
    s_we = 0;
    for (int x = 0; x < 16; x++) begin
      s_x = 4'(x); #1;
      check(s_b, small_exp[x], $sformatf("example x=%0d", x));
    end

    for (int trial = 0; trial < 300; trial++) begin
      c = rand_cuts(DEF_N, 1 << DEF_BW, DEF_N - 1);
      if (trial % 3 == 0) begin
        // Full set of fine cuts.
        c.nedge = (1 << DEF_BW) - 1;
        for (int k = 0; k < c.nedge; k++) c.cut[k] = $urandom_range(255, 0);
        c = sort_cuts(c);
      end
      @(negedge clk);
      d_we = 1;
      for (int k = 0; k < (1 << DEF_BW) - 1; k++) begin
        d_addr = CFG_AW'(k);
        d_data = CFG_DW'(lube_thr(c, DEF_N, k));
        @(negedge clk);
      end
      d_we = 0;
      for (int x = 0; x < (1 << DEF_N); x++) begin
        d_x = DEF_N'(x); #1;
        check(d_b, (x == 255) ? ref_bin(c, x) + (7 - c.nedge) : ref_bin(c, x),
              $sformatf("trial %0d x=%0d", trial, x));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
