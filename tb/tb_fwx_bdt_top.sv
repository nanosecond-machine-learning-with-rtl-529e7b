// tb_fwx_bdt_top: end-to-end testbench of the evaluation processor at its
// default size (4 variables of 8 bits, 10 trees, 8 bins per variable and
// tree, bit shift bin engines with 16 slices, 4096-entry score arrays).
//
// It loads a random forest through the configuration port (cut layouts,
// score arrays, a clipped linear transform table), streams events with a
// random mix of back-to-back issue and idle cycles, and compares every output
// with a reference that bins each variable by counting cut edges, adds the
// addressed tree scores and applies the transform. Each output must appear
// exactly 3 clocks after its input. It then loads a second forest and repeats.
// Counted mechanisms, each of which must occur: back-to-back events, idle
// cycles, inputs on a cut edge, bins reached through a second slice, negative
// and positive sums, and a forest reload.
module tb_fwx_bdt_top;
  import fwx_pkg::*;
  import tb_fwx_pkg::*;

  localparam int V = DEF_V, N = DEF_N, T = DEF_T, SW = DEF_SW, OW = DEF_OW;
  localparam int BW = DEF_BW, E = DEF_E;
  localparam int SUMW = SW + $clog2(T);
  localparam int DEPTH = 1 << (V * BW);
  localparam int LATENCY = 3;
  localparam int EVENTS = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  cfg_wr_t                cfg;
  logic                   in_valid;
  logic [V*N-1:0]         x;
  logic                   out_valid;
  logic [OW-1:0]          out_score;
  logic signed [SUMW-1:0] out_sum;

  fwx_bdt_top u_dut (.clk, .rst_n, .cfg, .in_valid, .x, .out_valid, .out_score, .out_sum);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference forest.
  cuts_t         cuts   [T][V];
  slices_t       slices [T][V];
  logic [SW-1:0] scores [T][DEPTH];

  function automatic int xf(int s);
    int r = s / 4 + 128;
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return r;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic cfg_write(cfg_sel_e sel, int tree, int var_idx, int addr, logic [31:0] data);
    cfg.we = 1'b1; cfg.sel = sel; cfg.tree = 8'(tree); cfg.var_idx = 8'(var_idx);
    cfg.addr = CFG_AW'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic load_forest();
    for (int t = 0; t < T; t++)
      for (int v = 0; v < V; v++) begin
        cuts[t][v]   = rand_bsbe_cuts(N, 1 << BW, E);
        slices[t][v] = to_slices(cuts[t][v], N);
        for (int e = 0; e < E; e++)
          cfg_write(CFG_BIN, t, v, e,
                    (e < slices[t][v].n)
                      ? bsbe_word(1, slices[t][v].layer[e], slices[t][v].bin[e], slices[t][v].pfx[e])
                      : bsbe_word(0, 0, 0, 0));
      end
    for (int t = 0; t < T; t++)
      for (int a = 0; a < DEPTH; a++) begin
        scores[t][a] = SW'($urandom);
        cfg_write(CFG_SCORE, t, 0, a, 32'(scores[t][a]));
      end
  endtask

  task automatic load_xform();
    for (int a = 0; a < (1 << SUMW); a++)
      cfg_write(CFG_XFORM, 0, 0, a,
                32'(xf(a >= (1 << (SUMW - 1)) ? a - (1 << SUMW) : a)));
  endtask

  // Expected outputs in issue order.
  typedef struct { longint due; int sum; int score; } exp_t;
  exp_t   expq [$];
  longint cycle = 0;

  int n_b2b = 0, n_idle = 0, n_edge = 0, n_multi = 0, n_neg = 0, n_pos = 0, n_reload = 0;
  int n_out = 0;
  bit prev_valid = 0;

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

  task automatic run_events(int count);
    int unsigned xv [V];
    int unsigned b, addr;
    int s;
    for (int i = 0; i < count; i++) begin
      in_valid = ($urandom_range(3, 0) != 0);
      if (in_valid) begin
        if (prev_valid) n_b2b++;
        for (int v = 0; v < V; v++) begin
          // Sometimes pick a cut edge of tree 0 exactly.
          if (cuts[0][v].nedge > 0 && $urandom_range(3, 0) == 0)
            xv[v] = cuts[0][v].cut[$urandom_range(cuts[0][v].nedge - 1, 0)];
          else
            xv[v] = $urandom_range((1 << N) - 1, 0);
          x[v*N +: N] = N'(xv[v]);
        end
        s = 0;
        for (int t = 0; t < T; t++) begin
          addr = 0;
          for (int v = 0; v < V; v++) begin
            b = ref_bin(cuts[t][v], xv[v]);
            addr |= b << (v * BW);
            for (int k = 0; k < cuts[t][v].nedge; k++)
              if (cuts[t][v].cut[k] == xv[v]) n_edge++;
            if (multi_slice_bin(slices[t][v], b)) n_multi++;
          end
          s += int'($signed(scores[t][addr]));
        end
        if (s < 0) n_neg++; else n_pos++;
        expq.push_back('{due: cycle + LATENCY, sum: s, score: xf(s)});
      end else begin
        n_idle++;
        x = {$urandom, $urandom};
      end
      prev_valid = in_valid;
      @(negedge clk);
    end
    in_valid = 1'b0;
    prev_valid = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
  endtask

  task automatic need(int n, string what);
    checks++;
    $display("mechanism %-26s %0d", what, n);
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
  endtask

  initial begin
    cfg = '0; in_valid = 1'b0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_xform();
    load_forest();
    run_events(EVENTS);
    load_forest();
    n_reload++;
    run_events(EVENTS);
    checks++;
    if (expq.size() != 0) fail("outputs missing at end");
    need(n_b2b, "back-to-back events");
    need(n_idle, "idle cycles");
    need(n_edge, "input on a cut edge");
    need(n_multi, "bin of several slices");
    need(n_neg, "negative sum");
    need(n_pos, "positive sum");
    need(n_reload, "forest reload");
    need(n_out, "outputs checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
