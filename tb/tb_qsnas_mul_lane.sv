// tb_qsnas_mul_lane: exhaustive test of the PE multiplier.
// Every q = 3 weight (signed) and activation (unsigned) pair is tried in
// normal mode and in first-layer mode with shifts 0, 3 and 6; a q = 1
// instance is checked as an XNOR (+1/-1) and, in first-layer mode, as
// pixel bit times +1/-1.  Expected values are computed with integers.
module tb_qsnas_mul_lane;
  int checks = 0, failures = 0;
  logic [2:0] w, a;
  logic first;
  logic signed [11:0] p0, p3, p6;
  logic w1, a1;
  logic signed [8:0] pb;

  qsnas_mul_lane #(.Q(3), .SH(0), .PW(12)) u0 (.w(w), .a(a), .first(first), .p(p0));
  qsnas_mul_lane #(.Q(3), .SH(3), .PW(12)) u3 (.w(w), .a(a), .first(first), .p(p3));
  qsnas_mul_lane #(.Q(3), .SH(6), .PW(12)) u6 (.w(w), .a(a), .first(first), .p(p6));
  qsnas_mul_lane #(.Q(1), .SH(4), .PW(9))  ub (.w(w1), .a(a1), .first(first), .p(pb));

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: w=%0d a=%0d first=%0b got %0d expected %0d", what, $signed(w), a, first, got, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < 2; f++)
      for (int wi = -4; wi < 4; wi++)
        for (int ai = 0; ai < 8; ai++) begin
          int e;
          first = f[0]; w = 3'(wi); a = 3'(ai);
          #1;
          e = wi * ai;
          chk(int'(p0), e, "sh0");
          chk(int'(p3), f ? e * 8 : e, "sh3");
          chk(int'(p6), f ? e * 64 : e, "sh6");
        end
    for (int f = 0; f < 2; f++)
      for (int wi = 0; wi < 2; wi++)
        for (int ai = 0; ai < 2; ai++) begin
          int e, wv;
          first = f[0]; w1 = wi[0]; a1 = ai[0];
          #1;
          wv = wi ? 1 : -1;
          if (f) e = ai * wv * 16;
          else   e = wv * (ai ? 1 : -1);
          chk(int'(pb), e, "bin");
        end
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
