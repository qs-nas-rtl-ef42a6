// tb_qsnas_bn_quant: batch norm zeta*(x-alpha) and quantizing ReLU.
// Random accumulations and parameters (and edge cases around 0 and the
// q-bit maximum) are compared with an integer model: y = floor((x-alpha)
// * zeta / 2^FRAC), clamped to [0, 7] for q = 3, sign bit for q = 1, and
// the raw y saturated to 32 bits.  Outputs are checked one clock later.
module tb_qsnas_bn_quant;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid, out_valid1;
  logic signed [31:0] x = '0, alpha = '0, raw_out, raw1;
  logic signed [15:0] zeta = '0;
  logic [2:0] q_out;
  logic [0:0] q1;

  qsnas_bn_quant #(.Q(3)) dut (.*);
  qsnas_bn_quant #(.Q(1)) dut1 (.clk, .rst_n, .in_valid, .x, .alpha, .zeta,
                                .out_valid(out_valid1), .q_out(q1), .raw_out(raw1));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      longint y, yr;
      int eq, e1;
      @(negedge clk);
      in_valid = 1;
      case (k % 4)
        0: begin x = $urandom_range(4000) - 2000; alpha = $urandom_range(400) - 200;
                 zeta = 16'($urandom_range(600)); end
        1: begin x = $urandom; alpha = $urandom; zeta = 16'($urandom); end
        2: begin x = $urandom_range(20) - 10; alpha = 0; zeta = 16'(256); end
        default: begin x = $urandom_range(2000); alpha = $urandom_range(1000);
                 zeta = -16'($urandom_range(300)); end
      endcase
      y  = (longint'(x) - longint'(alpha)) * longint'(zeta);
      y  = y >>> 8;
      eq = (y < 0) ? 0 : (y > 7) ? 7 : int'(y);
      e1 = (y >= 0);
      yr = (y > 64'sh7fffffff) ? 64'sh7fffffff : (y < -64'sh80000000) ? -64'sh80000000 : y;
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (!out_valid || q_out != 3'(eq)) begin failures++; $display("q %0d expected %0d (x=%0d a=%0d z=%0d)", q_out, eq, x, alpha, zeta); end
      if (raw_out != 32'(yr)) begin failures++; $display("raw %0d expected %0d", raw_out, yr); end
      if (q1 != 1'(e1)) begin failures++; $display("sign %0d expected %0d", q1, e1); end
    end
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
