// fwx_bdt_top: evaluation processor of a boosted decision tree classifier
// for a low latency trigger. It scores one event per clock with a latency of
// three clocks.
//
// The forest has been flattened and merged in software: each of the T trees
// is a grid over the V input variables whose cells hold a score. Evaluating a
// tree therefore means finding, independently per variable, which bin the
// input falls in (a bin engine per variable and tree) and reading the score
// at those bin indices (tree_lut). The score processor adds the T tree
// scores and applies a transform. This structure, the bin engines, the
// default sizes (4 variables of 8 bits, 10 trees, 8-bit scores, bit shift bin
// engine) and the 3-clock latency with an interval of one clock follow the
// document.
//
// Pipeline (own arrangement that meets the document's 3 clocks):
//   clock 1  bus_tap registers x
//   clock 2  bin engines (combinational) -> tree score arrays read
//   clock 3  sum + transform registered -> out_score, out_sum, out_valid
// The document reports about 10 ns whatever the clock between 100 and
// 320 MHz, i.e. fewer clocks at a slower clock. LATENCY selects 3 (default,
// for 320 MHz), 2 (no output register) or 1 (no input register either; only
// the score read is clocked).
//
// Configuration (own choice): the cut layout of every bin engine, the score
// arrays and the transform table are loaded through the cfg port (cfg_wr_t in
// fwx_pkg) while no event is in flight. ENGINE selects the bin engine type for
// all variables.
module fwx_bdt_top
  import fwx_pkg::*;
#(
  parameter int unsigned V  = DEF_V,
  parameter int unsigned N  = DEF_N,
  parameter int unsigned T  = DEF_T,
  parameter int unsigned SW = DEF_SW,
  parameter int unsigned OW = DEF_OW,
  parameter int unsigned BW = DEF_BW,
  parameter int unsigned E  = DEF_E,
  parameter engine_e     ENGINE = ENG_BSBE,
  parameter int unsigned LATENCY = 3,      // clocks from in_valid to out_valid, 1..3
  parameter int unsigned SUMW = SW + $clog2(T)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  cfg_wr_t                cfg,
  input  logic                   in_valid,
  input  logic [V*N-1:0]         x,
  output logic                   out_valid,
  output logic [OW-1:0]          out_score,
  output logic signed [SUMW-1:0] out_sum
);

  // Stage 1: bus tap.
  logic         tap_valid;
  logic [N-1:0] x_var [V];

  bus_tap #(.V(V), .N(N), .REG(LATENCY >= 2)) u_tap (
    .clk, .rst_n, .in_valid, .x,
    .out_valid(tap_valid), .x_var
  );

  // Stage 2: bin engines and tree score arrays.
  logic [BW-1:0]        bin   [T][V];
  logic signed [SW-1:0] score [T];
  logic [T-1:0]         lut_valid;

  for (genvar t = 0; t < T; t++) begin : g_tree
    for (genvar v = 0; v < V; v++) begin : g_var
      logic eng_we;
      assign eng_we = cfg.we && cfg.sel == CFG_BIN &&
                      cfg.tree == 8'(t) && cfg.var_idx == 8'(v);
      if (ENGINE == ENG_BSBE) begin : g_bsbe
        bsbe #(.N(N), .BW(BW), .E(E), .L(N)) u_eng (
          .clk, .rst_n, .cfg_we(eng_we), .cfg_addr(cfg.addr),
          .cfg_data(cfg.data), .x(x_var[v]), .b(bin[t][v])
        );
      end else begin : g_lube
        lube #(.N(N), .BW(BW)) u_eng (
          .clk, .rst_n, .cfg_we(eng_we), .cfg_addr(cfg.addr),
          .cfg_data(cfg.data), .x(x_var[v]), .b(bin[t][v])
        );
      end
    end

    tree_lut #(.V(V), .BW(BW), .SW(SW)) u_lut (
      .clk, .rst_n,
      .we(cfg.we && cfg.sel == CFG_SCORE && cfg.tree == 8'(t)),
      .waddr(cfg.addr[V*BW-1:0]),
      .wdata(cfg.data[SW-1:0]),
      .rd_en(tap_valid),
      .b(bin[t]),
      .out_valid(lut_valid[t]),
      .score(score[t])
    );
  end

  // Stage 3: score processor.
  score_proc #(.T(T), .SW(SW), .OW(OW), .SUMW(SUMW), .REG(LATENCY >= 3)) u_sp (
    .clk, .rst_n,
    .xf_we(cfg.we && cfg.sel == CFG_XFORM),
    .xf_waddr(cfg.addr[SUMW-1:0]),
    .xf_wdata(cfg.data[OW-1:0]),
    .in_valid(lut_valid[0]),
    .score,
    .out_valid, .out_score, .out_sum
  );

  if (LATENCY < 1 || LATENCY > 3) begin : g_bad_latency
    $error("LATENCY must be 1, 2 or 3");
  end

  // The forest may only be reloaded while no event is in flight.
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg.we |-> !(in_valid || tap_valid || lut_valid[0]))
    else $error("configuration write while an event is in flight");

endmodule
