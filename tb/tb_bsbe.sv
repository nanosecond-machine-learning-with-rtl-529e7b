// tb_bsbe: self-checking testbench of the bit shift bin engine.
// Part 1 loads the 4-bit, 4-bin, 3-layer example layout (bins 0-7, 8-11, 12-13, 14-15,
// one slice each at layers 1, 2, 3, 3) into a small engine and checks every x.
// Part 2 loads random cut layouts, covered by up to 16 aligned slices, into
// an engine of the default size and checks every x against the count of cut
// edges <= x.
module tb_bsbe;
  import fwx_pkg::*;
  import tb_fwx_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Small engine: N=4, 4 bins, 4 entries.
  logic              s_we;
  logic [CFG_AW-1:0] s_addr;
  logic [CFG_DW-1:0] s_data;
  logic [3:0]        s_x;
  logic [1:0]        s_b;
  bsbe #(.N(4), .BW(2), .E(4), .L(3)) u_small (
    .clk, .rst_n, .cfg_we(s_we), .cfg_addr(s_addr), .cfg_data(s_data),
    .x(s_x), .b(s_b));

  // Default engine.
  logic              d_we;
  logic [CFG_AW-1:0] d_addr;
  logic [CFG_DW-1:0] d_data;
  logic [DEF_N-1:0]  d_x;
  logic [DEF_BW-1:0] d_b;
  bsbe u_dut (
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
  cuts_t   c;
  slices_t s;

  initial begin
    s_we = 0; s_addr = '0; s_data = '0; s_x = '0;
    d_we = 0; d_addr = '0; d_data = '0; d_x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // After reset no entry is valid: bin 0 everywhere.
    d_x = 8'd200; #1; check(d_b, 0, "reset bin");

    // Part 1: example layout.
    @(negedge clk);
    s_we = 1;
    s_addr = 0; s_data = bsbe_word(1, 1, 0, 0); @(negedge clk);
    s_addr = 1; s_data = bsbe_word(1, 2, 1, 2); @(negedge clk);
    s_addr = 2; s_data = bsbe_word(1, 3, 2, 6); @(negedge clk);
    s_addr = 3; s_data = bsbe_word(1, 3, 3, 7); @(negedge clk);
    s_we = 0;
    for (int x = 0; x < 16; x++) begin
      s_x = 4'(x); #1;
      check(s_b, small_exp[x], $sformatf("example x=%0d", x));
    end

    // Part 2: random layouts.
    for (int trial = 0; trial < 300; trial++) begin
      c = rand_bsbe_cuts(DEF_N, 1 << DEF_BW, DEF_E);
      s = to_slices(c, DEF_N);
      @(negedge clk);
      d_we = 1;
      for (int e = 0; e < DEF_E; e++) begin
        d_addr = CFG_AW'(e);
        d_data = (e < s.n) ? bsbe_word(1, s.layer[e], s.bin[e], s.pfx[e])
                           : bsbe_word(0, 0, 0, 0);
        @(negedge clk);
      end
      d_we = 0;
      for (int x = 0; x < (1 << DEF_N); x++) begin
        d_x = DEF_N'(x); #1;
        check(d_b, ref_bin(c, x), $sformatf("trial %0d x=%0d", trial, x));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
