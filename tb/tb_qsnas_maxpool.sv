// tb_qsnas_maxpool: 2x2 max-pool by a 3-step bubble pass.
// Random patches of four 3-bit values (with ties, maxima in every slot)
// are fed with random spacing of 3..6 clocks; each maximum must come out
// with the tag of the fourth value exactly 3 clocks after the fourth
// value is taken (seen at the fifth edge after it was set up).
module tb_qsnas_maxpool;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;

  logic in_valid = 0, in_first = 0, out_valid;
  logic [2:0] in_val = '0, out_val;
  logic [15:0] in_tag = '0, out_tag;

  qsnas_maxpool #(.Q(3), .TAG_W(16)) dut (.*);

  int exp_v [$], exp_t [$], exp_c [$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      int v, t, c;
      v = exp_v.pop_front(); t = exp_t.pop_front(); c = exp_c.pop_front();
      checks++;
      if (out_val != 3'(v) || out_tag != 16'(t) || cyc - c != 5) begin
        failures++;
        $display("max %0d tag %0d after %0d, expected %0d tag %0d", out_val, out_tag, cyc - c, v, t);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int mx;
      mx = 0;
      for (int i = 0; i < 4; i++) begin
        int v;
        v = (k % 5 == 0) ? 3 : int'($urandom_range(7));
        if (v > mx) mx = v;
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_val = 3'(v); in_tag = 16'(i == 3 ? k : 999);
        if (i == 3) begin exp_v.push_back(mx); exp_t.push_back(k); exp_c.push_back(cyc); end
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(3) + 1) @(negedge clk);
      end
    end
    repeat (8) @(negedge clk);
    checks++;
    if (exp_v.size() != 0) begin failures++; $display("%0d maxima missing", exp_v.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
