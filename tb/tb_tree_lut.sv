// tb_tree_lut: self-checking testbench of one tree's score array at the
// default size (4 bin indices of 3 bits, 4096 scores of 8 bits). Loads random
// scores, then reads random bin-index combinations back to back and checks
// the score and the one-clock read latency.
module tb_tree_lut;
  import fwx_pkg::*;

  localparam int V = DEF_V, BW = DEF_BW, SW = DEF_SW;
  localparam int DEPTH = 1 << (V * BW);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 we;
  logic [V*BW-1:0]      waddr;
  logic [SW-1:0]        wdata;
  logic                 rd_en;
  logic [BW-1:0]        b [V];
  logic                 out_valid;
  logic signed [SW-1:0] score;

  tree_lut u_dut (.clk, .rst_n, .we, .waddr, .wdata, .rd_en, .b, .out_valid, .score);

  logic [SW-1:0] model [DEPTH];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned addr, exp_addr;
  bit          exp_v;

  initial begin
    we = 0; waddr = '0; wdata = '0; rd_en = 0;
    for (int v = 0; v < V; v++) b[v] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    we = 1;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = SW'($urandom);
      waddr = (V*BW)'(a); wdata = model[a];
      @(negedge clk);
    end
    we = 0;
    exp_v = 0;
    for (int i = 0; i < 5000; i++) begin
      rd_en = ($urandom_range(4, 0) != 0);
      addr = $urandom_range(DEPTH - 1, 0);
      for (int v = 0; v < V; v++) b[v] = BW'(addr >> (v * BW));
      @(posedge clk); #1;
      checks++;
      if (out_valid !== rd_en) begin failures++; $display("FAIL valid %0d", i); end
      if (rd_en) begin
        checks++;
        if (score !== model[addr]) begin
          failures++;
          $display("FAIL addr %0d: got %0d expected %0d", addr, score, $signed(model[addr]));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
