// lube: look up bin engine. Turns one N-bit input variable into the index of
// the bin it falls in by comparing it with the cut thresholds of the variable.
//
// How it works (as in the document): the B-1 thresholds, in ascending order,
// sit in a small memory. Comparator k gives c[k] = (x < thr[k]), a
// thermometer code. The first active input is c[0] itself, inputs 1..B-2 are
// the XOR of neighbouring comparators, and the last is the NAND of the last
// comparator (an inverter), so exactly one input is active. A look-up maps
// that active input to the bin index, which equals the number of thresholds
// that are <= x.
//
// Own choices: the thresholds are registers loaded through a write port and
// reset to all ones; unused thresholds are left at all ones. The threshold
// read is continuous (the registers are always visible), so x -> b is purely
// combinational.
//
// Interface: cfg_we/cfg_addr/cfg_data[N-1:0] write threshold cfg_addr.
module lube
  import fwx_pkg::*;
#(
  parameter int unsigned N  = DEF_N,   // input and threshold bits
  parameter int unsigned BW = DEF_BW   // bin index bits; B = 2^BW bins
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [CFG_DW-1:0] cfg_data,
  input  logic [N-1:0]      x,
  output logic [BW-1:0]     b
);

  localparam int unsigned B = 1 << BW;

  logic [N-1:0]  thr [B-1];
  logic [BW-1:0] widx;
  assign widx = cfg_addr[BW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < B - 1; k++) thr[k] <= '1;
    end else if (cfg_we && cfg_addr < CFG_AW'(B - 1)) begin
      thr[widx] <= cfg_data[N-1:0];
    end
  end

  logic [B-2:0] c;      // thermometer: c[k] = x < thr[k]
  logic [B-1:0] act;    // active input array (one-hot for sorted thresholds)

  always_comb begin
    for (int k = 0; k < B - 1; k++) c[k] = (x < thr[k]);
    act[0] = c[0];
    for (int k = 1; k < B - 1; k++) act[k] = c[k-1] ^ c[k];
    act[B-1] = ~(c[B-2] & c[B-2]);
  end

  always_comb begin
    b = '0;
    for (int k = 0; k < B; k++)
      if (act[k]) b |= BW'(k);
  end

endmodule
