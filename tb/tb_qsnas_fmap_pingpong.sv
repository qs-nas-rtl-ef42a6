// tb_qsnas_fmap_pingpong: the two swapping fmap memories.
// An image is loaded into bank 0; with sel = 0 it is read back while a
// "layer" writes other words, which must land in bank 1 only.  After the
// swap (sel = 1) the layer's words are read back and new writes must go to
// bank 0.  Read data follows the address by one clock, and belongs to the
// bank selected when the address was given.
module tb_qsnas_fmap_pingpong;
  localparam int M = 32, Q = 3, DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sel = 0, we = 0, ld_we = 0;
  logic [9:0] raddr = '0, waddr = '0, ld_addr = '0;
  logic [M*Q-1:0] rdata, wdata = '0, ld_data = '0;
  logic [M*Q-1:0] b0 [64], b1 [64];

  qsnas_fmap_pingpong #(.M(M), .Q(Q), .DEPTH(DEPTH)) dut (.*);

  function automatic logic [M*Q-1:0] rnd();
    return {$urandom, $urandom, $urandom};
  endfunction

  task automatic rd_check(int a, logic [M*Q-1:0] e);
    @(negedge clk); raddr = 10'(a);
    @(negedge clk);
    checks++;
    if (rdata !== e) begin failures++; $display("sel=%0b addr %0d wrong", sel, a); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      b0[i] = rnd(); b1[i] = rnd();
      @(negedge clk); ld_we = 1; ld_addr = 10'(i); ld_data = b0[i];
    end
    @(negedge clk); ld_we = 0;
    // layer 0: reads bank 0, writes bank 1
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = b1[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) rd_check(i, b0[i]);
    // swap: reads bank 1, writes bank 0
    @(negedge clk); sel = 1;
    for (int i = 0; i < 64; i++) rd_check(i, b1[i]);
    for (int i = 0; i < 32; i++) begin
      b0[i] = rnd();
      @(negedge clk); we = 1; waddr = 10'(i); wdata = b0[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) rd_check(i, b1[i]);
    @(negedge clk); sel = 0;
    for (int i = 0; i < 64; i++) rd_check(i, b0[i]);
    // the data of an address given just before a swap comes from the old bank
    @(negedge clk); raddr = 10'(7); sel = 0;
    @(negedge clk); sel = 1;
    checks++;
    if (rdata !== b0[7]) begin failures++; $display("read across swap wrong"); end
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
