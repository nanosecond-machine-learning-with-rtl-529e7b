// tree_lut: score array of one merged, flattened tree. Because flattening
// turns each tree into a grid of bins whose axes are independent, the score
// of an event is simply the array entry addressed by the V bin indices.
//
// The address is the concatenation {b[V-1], ..., b[1], b[0]}, so the array
// holds 2^(V*BW) scores of SW bits (two's complement). It is written through
// a write port when the forest is loaded and read synchronously, as a block
// RAM would be: score/out_valid follow addr/rd_en by one clock. The array is
// not reset. The document gives the function (bin indices -> output score, a
// LUT/BRAM array); the address layout is this design's choice.
module tree_lut
  import fwx_pkg::*;
#(
  parameter int unsigned V  = DEF_V,
  parameter int unsigned BW = DEF_BW,
  parameter int unsigned SW = DEF_SW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [V*BW-1:0]      waddr,
  input  logic [SW-1:0]        wdata,
  input  logic                 rd_en,
  input  logic [BW-1:0]        b [V],
  output logic                 out_valid,
  output logic signed [SW-1:0] score
);

  localparam int unsigned AW    = V * BW;
  localparam int unsigned DEPTH = 1 << AW;

  logic [SW-1:0] mem [DEPTH];
  logic [AW-1:0] raddr;

  always_comb begin
    for (int v = 0; v < V; v++) raddr[v*BW +: BW] = b[v];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) score <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= rd_en;
  end

endmodule
