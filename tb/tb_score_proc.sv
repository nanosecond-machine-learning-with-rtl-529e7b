// tb_score_proc: self-checking testbench of the score processor at the
// default size (10 trees, 8-bit scores, 12-bit sum, 8-bit output). Loads a
// transform table f(s) = clip(s/4 + 128, 0, 255), a clipped linear stand-in
// for a squashing function, then applies random and extreme tree scores and
// checks the sum, the transformed output and the one-clock latency. A second
// instance without the output register (REG=0), loaded with the same table,
// must give the same results at once, before the clock edge.
module tb_score_proc;
  import fwx_pkg::*;

  localparam int T = DEF_T, SW = DEF_SW, OW = DEF_OW;
  localparam int SUMW = SW + $clog2(T);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                   xf_we;
  logic [SUMW-1:0]        xf_waddr;
  logic [OW-1:0]          xf_wdata;
  logic                   in_valid;
  logic signed [SW-1:0]   score [T];
  logic                   out_valid;
  logic [OW-1:0]          out_score;
  logic signed [SUMW-1:0] out_sum;

  score_proc u_dut (.clk, .rst_n, .xf_we, .xf_waddr, .xf_wdata, .in_valid,
                    .score, .out_valid, .out_score, .out_sum);

  logic                   c_valid;
  logic [OW-1:0]          c_score;
  logic signed [SUMW-1:0] c_sum;
  score_proc #(.REG(1'b0)) u_comb (.clk, .rst_n, .xf_we, .xf_waddr, .xf_wdata, .in_valid,
                    .score, .out_valid(c_valid), .out_score(c_score), .out_sum(c_sum));

  function automatic int xf(int s);
    int r = s / 4 + 128;
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return r;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s;
  int n_neg = 0, n_pos = 0;

  initial begin
    xf_we = 0; xf_waddr = '0; xf_wdata = '0; in_valid = 0;
    for (int t = 0; t < T; t++) score[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    xf_we = 1;
    for (int a = 0; a < (1 << SUMW); a++) begin
      xf_waddr = SUMW'(a);
      xf_wdata = OW'(xf(a >= (1 << (SUMW - 1)) ? a - (1 << SUMW) : a));
      @(negedge clk);
    end
    xf_we = 0;
    for (int i = 0; i < 4000; i++) begin
      in_valid = ($urandom_range(3, 0) != 0);
      s = 0;
      for (int t = 0; t < T; t++) begin
        case (i)
          0: score[t] = -128;
          1: score[t] = 127;
          default: score[t] = SW'($urandom);
        endcase
        s += score[t];
      end
      #1;
      checks += 3;
      if (c_valid !== in_valid) begin failures++; $display("FAIL comb valid %0d", i); end
      if (c_sum !== SUMW'(s)) begin failures++; $display("FAIL comb sum %0d", i); end
      if (c_score !== OW'(xf(s))) begin failures++; $display("FAIL comb out %0d", i); end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid %0d", i); end
      if (in_valid) begin
        if (s < 0) n_neg++; else n_pos++;
        checks += 2;
        if (out_sum !== SUMW'(s)) begin
          failures++; $display("FAIL sum %0d: got %0d expected %0d", i, out_sum, s);
        end
        if (out_score !== OW'(xf(s))) begin
          failures++; $display("FAIL out %0d: got %0d expected %0d", i, out_score, xf(s));
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
