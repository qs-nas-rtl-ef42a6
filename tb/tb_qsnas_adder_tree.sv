// tb_qsnas_adder_tree: the PE adder tree sums 32 signed 12-bit inputs.
// A stream of random vectors (including all-minimum and all-maximum ones)
// enters one per clock with gaps; each sum must appear exactly clog2(32) = 5
// clocks after its inputs (seen at the sixth edge) and equal the integer sum.  A 5-input instance
// checks the padding of a non-power-of-two tree (latency 3).
module tb_qsnas_adder_tree;
  localparam int N = 32, IW = 12, LAT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic signed [N-1:0][IW-1:0] in = '0;
  logic signed [IW+LAT-1:0] sum;
  logic in_valid5 = 0, out_valid5;
  logic signed [4:0][IW-1:0] in5 = '0;
  logic signed [IW+2:0] sum5;

  qsnas_adder_tree #(.N(N), .IW(IW)) dut (.clk, .rst_n, .in_valid, .in, .out_valid, .sum);
  qsnas_adder_tree #(.N(5), .IW(IW)) dut5 (.clk, .rst_n, .in_valid(in_valid5), .in(in5),
                                           .out_valid(out_valid5), .sum(sum5));

  int exp_q [$];
  int exp5_q [$];
  int t_in [$];
  int cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      int e, t;
      e = exp_q.pop_front(); t = t_in.pop_front();
      checks++;
      if (int'(sum) != e || cyc - t != LAT + 1) begin
        failures++;
        $display("sum %0d expected %0d, latency %0d", sum, e, cyc - t - 1);
      end
    end
    if (out_valid5) begin
      int e;
      e = exp5_q.pop_front();
      checks++;
      if (int'(sum5) != e) begin failures++; $display("sum5 %0d expected %0d", sum5, e); end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      int s, s5;
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      s = 0; s5 = 0;
      for (int i = 0; i < N; i++) begin
        int v;
        v = int'($urandom_range(4095)) - 2048;
        if (k == 3) v = -2048;
        if (k == 4) v = 2047;
        in[i] = IW'(v);
        s += v;
        if (i < 5) begin in5[i] = IW'(v); s5 += v; end
      end
      in_valid5 = in_valid;
      if (in_valid) begin exp_q.push_back(s); exp5_q.push_back(s5); t_in.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0; in_valid5 = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || exp5_q.size() != 0) begin failures++; $display("sums missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
