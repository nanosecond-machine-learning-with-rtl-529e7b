// tb_bus_tap: self-checking testbench of the input stage. Drives random
// buses with random valid patterns and checks that one clock later each
// variable holds its N-bit field of the bus and out_valid follows in_valid.
// A second instance without the register (REG=0) must show the same split
// and valid at once, before the clock edge.
module tb_bus_tap;
  import fwx_pkg::*;

  localparam int V = DEF_V, N = DEF_N;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic           in_valid;
  logic [V*N-1:0] x;
  logic           out_valid;
  logic [N-1:0]   x_var [V];

  bus_tap u_dut (.clk, .rst_n, .in_valid, .x, .out_valid, .x_var);

  logic           c_valid;
  logic [N-1:0]   c_var [V];
  bus_tap #(.REG(1'b0)) u_comb (.clk, .rst_n, .in_valid, .x, .out_valid(c_valid), .x_var(c_var));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [V*N-1:0] prev_x;
  logic           prev_v;

  initial begin
    in_valid = 0; x = '0;
    repeat (2) @(posedge clk);
    #1; checks++; if (out_valid !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3, 0) != 0);
      x = {$urandom, $urandom};
      prev_x = x; prev_v = in_valid;
      #1;
      checks++;
      if (c_valid !== in_valid) begin failures++; $display("FAIL comb valid %0d", i); end
      for (int v = 0; v < V; v++) begin
        checks++;
        if (c_var[v] !== x[v*N +: N]) begin failures++; $display("FAIL comb var %0d", v); end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== prev_v) begin
        failures++; $display("FAIL valid at %0d", i);
      end
      if (prev_v)
        for (int v = 0; v < V; v++) begin
          checks++;
          if (x_var[v] !== prev_x[v*N +: N]) begin
            failures++;
            $display("FAIL var %0d: got %h expected %h", v, x_var[v], prev_x[v*N +: N]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
