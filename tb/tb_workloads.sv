// tb_workloads: runs the evaluation processor on forests shaped like the
// configurations it was built for.
//  - benchmark: default processor (4 variables, 10 trees) holding a forest of
//    26132 grid cells in total, split over trees and variables with at most 8
//    bins per variable (the per-tree split is this testbench's own choice).
//  - bench_slow: the same benchmark forest with LATENCY=1, the setting for a
//    100 MHz clock, where about 10 ns is a single clock.
//  - vbf: the processor widened to 5 input variables, as needed by the
//    five-variable signal-versus-multijet selection; 10 trees with random
//    bin counts (the tree count of that selection is this testbench's own
//    choice).
// Each run streams events on consecutive clocks and checks every output and
// its latency in clocks against a reference model.
module tb_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done_b, done_s, done_v;
  int   checks_b, failures_b, checks_s, failures_s, checks_v, failures_v;

  tb_forest_run #(.V(4), .T(10), .BENCH(1'b1), .EVENTS(3000)) u_bench (
    .clk, .done(done_b), .checks(checks_b), .failures(failures_b));

  tb_forest_run #(.V(4), .T(10), .BENCH(1'b1), .EVENTS(3000), .LAT(1)) u_bench_slow (
    .clk, .done(done_s), .checks(checks_s), .failures(failures_s));

  tb_forest_run #(.V(5), .T(10), .BENCH(1'b0), .EVENTS(3000)) u_vbf (
    .clk, .done(done_v), .checks(checks_v), .failures(failures_v));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_b + checks_s + checks_v, failures_b + failures_s + failures_v + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done_b && done_s && done_v);
    $display("TB_RESULT checks=%0d failures=%0d", checks_b + checks_s + checks_v, failures_b + failures_s + failures_v);
    $finish;
  end

endmodule
