// tb_qsnas_sram: block memory with one write and one registered read port.
// Random writes and reads are checked against a model array; read data
// must appear one clock after the address, and a read of the address being
// written returns the old word.
module tb_qsnas_sram;
  localparam int WIDTH = 96, DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_d;
  logic exp_v = 0;

  qsnas_sram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    // fill everything first so every read has a defined value
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = {$urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_d) begin failures++; $display("read mismatch at step %0d", k); end
      end
      raddr = 10'($urandom_range(DEPTH - 1));
      we = $urandom_range(1);
      waddr = (k % 7 == 0) ? raddr : 10'($urandom_range(DEPTH - 1));
      wdata = {$urandom, $urandom, $urandom};
      exp_d = model[raddr];          // old word even if written now
      exp_v = 1;
      if (we) model[waddr] = wdata;
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
