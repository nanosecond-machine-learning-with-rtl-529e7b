// bsbe: bit shift bin engine. Turns one N-bit input variable into the index
// of the bin it falls in, with no magnitude comparator and no clocked logic.
//
// How it works: for every layer l = 1..L the input is shifted right by N-l,
// which leaves its top l bits, i.e. which of the 2^l equal slices of the
// range x lies in. Each entry e of the engine names one slice: a layer l_e
// and an l_e-bit prefix. The entry matches when, at every layer up to l_e,
// the shifted input equals the prefix shifted to that layer; the per-layer
// equalities are AND-ed, one AND gate per entry. The matching entry
// forms the active input array, and a small look-up maps it to the entry's
// bin index. Following the document, the layout (how many entries, which
// prefixes) comes from the training result; here it is held in configuration
// registers so one netlist can hold any forest.
//
// The prefix is stored left aligned, so the comparison constant of every
// layer is a fixed shift of it, like the shifted input.
//
// Own choices: a bin may be covered by several entries (a cut that is not a
// power-of-two boundary needs more than one slice); entries are loaded through
// a write port and cleared by reset; when no valid entry matches the bin is 0.
//
// Interface: cfg_we/cfg_addr/cfg_data write entry cfg_addr (layout in
// fwx_pkg). x -> b is purely combinational.
module bsbe
  import fwx_pkg::*;
#(
  parameter int unsigned N  = DEF_N,   // input bits
  parameter int unsigned BW = DEF_BW,  // bin index bits
  parameter int unsigned E  = DEF_E,   // entries (slices) in the engine
  parameter int unsigned L  = DEF_N    // deepest layer; at most N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [CFG_DW-1:0] cfg_data,
  input  logic [N-1:0]      x,
  output logic [BW-1:0]     b
);

  localparam int unsigned LW = $clog2(L + 1);
  localparam int unsigned EW = (E > 1) ? $clog2(E) : 1;

  logic [E-1:0]        ent_valid;
  logic [LW-1:0]       ent_layer [E];
  logic [BW-1:0]       ent_bin   [E];
  logic [N-1:0]        ent_pfx   [E];   // prefix, left aligned to bit N-1

  logic [EW-1:0] widx;
  assign widx = cfg_addr[EW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      for (int e = 0; e < E; e++) begin
        ent_layer[e] <= '0;
        ent_bin[e]   <= '0;
        ent_pfx[e]   <= '0;
      end
    end else if (cfg_we && cfg_addr < CFG_AW'(E)) begin
      ent_valid[widx] <= cfg_data[BSBE_VALID_BIT];
      ent_layer[widx] <= cfg_data[BSBE_LAYER_LSB +: LW];
      ent_bin[widx]   <= cfg_data[BSBE_BIN_LSB +: BW];
      ent_pfx[widx]   <= cfg_data[N-1:0] << (N - int'(cfg_data[BSBE_LAYER_LSB +: LW]));
    end
  end

  // Shifted copies of the input, one per layer: sh[l] = x >> (N-l).
  logic [N-1:0] sh [1:L];
  always_comb begin
    for (int l = 1; l <= L; l++) sh[l] = x >> (N - l);
  end

  // Per-entry AND of the layer equalities.
  logic [E-1:0] match;
  always_comb begin
    for (int e = 0; e < E; e++) begin
      match[e] = ent_valid[e] && (ent_layer[e] != '0) && (ent_layer[e] <= LW'(L));
      for (int l = 1; l <= L; l++) begin
        if (LW'(l) <= ent_layer[e])
          match[e] &= (sh[l] == (ent_pfx[e] >> (N - l)));
      end
    end
  end

  // Active input array -> bin index.
  always_comb begin
    b = '0;
    for (int e = 0; e < E; e++)
      if (match[e]) b |= ent_bin[e];
  end

endmodule
