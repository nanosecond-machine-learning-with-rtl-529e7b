// bus_tap: input stage of the evaluation processor. It captures the input
// bus, which carries the V variables side by side (variable 0 in the least
// significant N bits), and splits it into V separate N-bit variables that are
// fanned out to the bin engines of every tree.
//
// The document names the bus tap and shows it splitting x into x_0..x_{V-1};
// registering the bus here, as the first of the three pipeline stages, is
// this design's choice. Timing: with REG=1 x_var/out_valid follow
// x/in_valid by one clock; with REG=0 (used for slower clocks, where the
// whole evaluation fits in fewer clocks) the stage is a plain split with no
// delay. One event per clock can be accepted.
module bus_tap
  import fwx_pkg::*;
#(
  parameter int unsigned V = DEF_V,
  parameter int unsigned N = DEF_N,
  parameter bit          REG = 1'b1   // register the bus (pipeline stage)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [V*N-1:0]   x,
  output logic             out_valid,
  output logic [N-1:0]     x_var [V]
);

  if (REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        for (int v = 0; v < V; v++) x_var[v] <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid)
          for (int v = 0; v < V; v++) x_var[v] <= x[v*N +: N];
      end
    end
  end else begin : g_comb
    always_comb begin
      out_valid = in_valid;
      for (int v = 0; v < V; v++) x_var[v] = x[v*N +: N];
    end
  end

endmodule
