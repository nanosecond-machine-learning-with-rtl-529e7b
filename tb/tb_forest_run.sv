// tb_forest_run: testbench helper that runs one forest configuration through
// an evaluation processor and checks it against a reference model.
//
// The per-(tree, variable) bin counts are either the fixed benchmark split
// (BENCH=1: 10 trees of 4 variables whose grids hold 26132 cells in total) or
// random counts of 2..2^BW bins. Each variable's bins are drawn as aligned
// slices (random halving of the range), so every bin engine needs exactly as
// many slices as bins. Only the score cells that a bin combination can reach
// are written, which makes the number of score writes equal to the number of
// grid cells of the forest. EVENTS events are then issued on consecutive
// clocks; every output must arrive LAT clocks after its input, so the run
// also checks the one-clock interval. done rises when the run is over.
module tb_forest_run
  import fwx_pkg::*;
  import tb_fwx_pkg::*;
#(
  parameter int V      = DEF_V,
  parameter int T      = DEF_T,
  parameter bit BENCH  = 1'b1,
  parameter int EVENTS = 2000,
  parameter int CELLS  = 26132,  // expected number of grid cells when BENCH
  parameter int LAT    = 3       // processor LATENCY setting
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int N = DEF_N, SW = DEF_SW, OW = DEF_OW, BW = DEF_BW, E = DEF_E;
  localparam int SUMW = SW + $clog2(T);
  localparam int DEPTH = 1 << (V * BW);
  localparam int LATENCY = LAT;

  // Benchmark split: bins of variables 0..3 for each of the 10 trees.
  localparam int BENCH_NB [40] = '{7,8,8,8, 4,8,8,8, 6,7,7,8, 7,8,8,8, 8,8,8,8,
                                   7,8,8,8, 6,7,7,8, 5,6,7,8, 7,7,7,8, 2,3,3,6};

  logic                   rst_n;
  cfg_wr_t                cfg;
  logic                   in_valid;
  logic [V*N-1:0]         x;
  logic                   out_valid;
  logic [OW-1:0]          out_score;
  logic signed [SUMW-1:0] out_sum;

  fwx_bdt_top #(.V(V), .T(T), .LATENCY(LAT)) u_dut (
    .clk, .rst_n, .cfg, .in_valid, .x, .out_valid, .out_score, .out_sum);

  int            nb     [T][V];
  cuts_t         cuts   [T][V];
  logic [SW-1:0] scores [T][DEPTH];

  function automatic int xf(int s);
    int r = s / 4 + 128;
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return r;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %m: %s", msg);
  endtask

  task automatic cfg_write(cfg_sel_e sel, int tree, int var_idx, int addr, logic [31:0] data);
    cfg.we = 1'b1; cfg.sel = sel; cfg.tree = 8'(tree); cfg.var_idx = 8'(var_idx);
    cfg.addr = CFG_AW'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  typedef struct { longint due; int sum; int score; } exp_t;
  exp_t   expq [$];
  longint cycle = 0;
  int     n_out = 0, n_cells = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (rst_n) begin
      if (expq.size() > 0 && expq[0].due == cycle) begin
        checks++;
        if (!out_valid) fail($sformatf("no output at cycle %0d", cycle));
        else begin
          checks += 2;
          n_out++;
          if (out_sum !== SUMW'(expq[0].sum))
            fail($sformatf("sum got %0d expected %0d", out_sum, expq[0].sum));
          if (out_score !== OW'(expq[0].score))
            fail($sformatf("score got %0d expected %0d", out_score, expq[0].score));
        end
        void'(expq.pop_front());
      end else if (out_valid) begin
        checks++;
        fail($sformatf("unexpected output at cycle %0d", cycle));
      end
    end
  end

  int unsigned xv [V];
  int unsigned addr, b, cells, rem;
  slices_t     sl;
  int          s;
  longint      first_out, last_out;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; cfg = '0; in_valid = 1'b0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < (1 << SUMW); a++)
      cfg_write(CFG_XFORM, 0, 0, a, 32'(xf(a >= (1 << (SUMW - 1)) ? a - (1 << SUMW) : a)));
    // Cut layouts.
    for (int t = 0; t < T; t++)
      for (int v = 0; v < V; v++) begin
        nb[t][v]   = BENCH ? BENCH_NB[(t * V + v) % 40] : $urandom_range(1 << BW, 2);
        cuts[t][v] = split_cuts(N, nb[t][v]);
        sl         = to_slices(cuts[t][v], N);
        checks++;
        if (sl.n > E) fail($sformatf("tree %0d var %0d needs %0d slices", t, v, sl.n));
        for (int e = 0; e < E; e++)
          cfg_write(CFG_BIN, t, v, e,
                    (e < sl.n) ? bsbe_word(1, sl.layer[e], sl.bin[e], sl.pfx[e])
                               : bsbe_word(0, 0, 0, 0));
      end
    // Score cells reachable by each tree's bins.
    for (int t = 0; t < T; t++) begin
      cells = 1;
      for (int v = 0; v < V; v++) cells *= nb[t][v];
      for (int c = 0; c < cells; c++) begin
        rem = c; addr = 0;
        for (int v = 0; v < V; v++) begin
          addr |= (rem % nb[t][v]) << (v * BW);
          rem = rem / nb[t][v];
        end
        scores[t][addr] = SW'($urandom);
        cfg_write(CFG_SCORE, t, 0, addr, 32'(scores[t][addr]));
        n_cells++;
      end
    end
    $display("%m: V=%0d T=%0d LATENCY=%0d, %0d grid cells loaded", V, T, LAT, n_cells);
    if (BENCH) begin
      checks++;
      if (n_cells != CELLS) fail($sformatf("%0d cells instead of %0d", n_cells, CELLS));
    end
    // Events on consecutive clocks.
    for (int i = 0; i < EVENTS; i++) begin
      in_valid = 1'b1;
      for (int v = 0; v < V; v++) begin
        xv[v] = $urandom_range((1 << N) - 1, 0);
        x[v*N +: N] = N'(xv[v]);
      end
      s = 0;
      for (int t = 0; t < T; t++) begin
        addr = 0;
        for (int v = 0; v < V; v++) begin
          b = ref_bin(cuts[t][v], xv[v]);
          addr |= b << (v * BW);
        end
        s += int'($signed(scores[t][addr]));
      end
      expq.push_back('{due: cycle + 64'(LATENCY), sum: s, score: xf(s)});
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    checks += 2;
    if (expq.size() != 0) fail("outputs missing");
    if (n_out != EVENTS) fail($sformatf("%0d outputs for %0d events", n_out, EVENTS));
    done = 1'b1;
  end

endmodule
