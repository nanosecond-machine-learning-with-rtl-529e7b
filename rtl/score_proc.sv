// score_proc: score processor. Adds the scores of the T trees and passes the
// sum through the transform function to give the BDT output score.
//
// The document gives the two steps (out' = sum of in'_t, out'' = f(out'),
// "e.g. tanh"). Here f is a table with one OW-bit entry per possible sum,
// indexed by the two's complement sum, so any monotonic squashing function
// (tanh, a sigmoid, a clipped rescale) can be loaded; the table and the
// choice to register the result are this design's own. The sum is
// SW + clog2(T) bits wide and cannot overflow.
//
// Timing: with REG=1 out_score, out_sum and out_valid follow score/in_valid
// by one clock; with REG=0 (for slower clocks) they follow combinationally.
module score_proc
  import fwx_pkg::*;
#(
  parameter int unsigned T  = DEF_T,
  parameter int unsigned SW = DEF_SW,
  parameter int unsigned OW = DEF_OW,
  parameter int unsigned SUMW = SW + $clog2(T),
  parameter bit          REG = 1'b1   // register the result (pipeline stage)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   xf_we,
  input  logic [SUMW-1:0]        xf_waddr,
  input  logic [OW-1:0]          xf_wdata,
  input  logic                   in_valid,
  input  logic signed [SW-1:0]   score [T],
  output logic                   out_valid,
  output logic [OW-1:0]          out_score,
  output logic signed [SUMW-1:0] out_sum
);

  logic [OW-1:0] xform [1 << SUMW];

  always_ff @(posedge clk) begin
    if (xf_we) xform[xf_waddr] <= xf_wdata;
  end

  logic signed [SUMW-1:0] sum;
  always_comb begin
    sum = '0;
    for (int t = 0; t < T; t++) sum += SUMW'(score[t]);
  end

  if (REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out_score <= '0;
        out_sum   <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) begin
          out_sum   <= sum;
          out_score <= xform[$unsigned(sum)];
        end
      end
    end
  end else begin : g_comb
    always_comb begin
      out_valid = in_valid;
      out_sum   = sum;
      out_score = xform[$unsigned(sum)];
    end
  end

endmodule
