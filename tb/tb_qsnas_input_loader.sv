// tb_qsnas_input_loader: RGB pixels to chunked fmap words.
// Random 24-bit pixels are streamed, with gaps and a second start of
// frame; each written word must hold, in lane 3c + j, bits [3j+2:3j] of
// channel c (9-bit zero-extended), zeros elsewhere, at the pixel's raster
// address, one clock after the pixel.  A q = 2 instance (4 chunks) is
// checked the same way.
module tb_qsnas_input_loader;
  localparam int M = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pix_valid = 0, pix_sof = 0;
  logic [23:0] pix_data = '0;
  logic ld_we, ld_we2;
  logic [9:0] ld_addr, ld_addr2;
  logic [M*3-1:0] ld_data;
  logic [M*2-1:0] ld_data2;

  qsnas_input_loader #(.Q(3), .M(M), .DEPTH(1024)) dut (.*);
  qsnas_input_loader #(.Q(2), .M(M), .DEPTH(1024)) dut2 (.clk, .rst_n, .pix_valid, .pix_sof, .pix_data,
                                                         .ld_we(ld_we2), .ld_addr(ld_addr2), .ld_data(ld_data2));

  function automatic logic [M*3-1:0] exp3(logic [23:0] px);
    logic [M*3-1:0] w = '0;
    for (int c = 0; c < 3; c++) for (int j = 0; j < 3; j++)
      w[(3*c + j)*3 +: 3] = 3'(9'(px[8*c +: 8]) >> (3*j));
    return w;
  endfunction
  function automatic logic [M*2-1:0] exp2(logic [23:0] px);
    logic [M*2-1:0] w = '0;
    for (int c = 0; c < 3; c++) for (int j = 0; j < 4; j++)
      w[(4*c + j)*2 +: 2] = px[8*c + 2*j +: 2];
    return w;
  endfunction

  initial begin
    int addr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      addr = 0;
      for (int i = 0; i < 40; i++) begin
        logic [23:0] px;
        px = 24'($urandom);
        @(negedge clk); pix_valid = 1; pix_sof = (i == 0); pix_data = px;
        @(negedge clk); pix_valid = 0;
        checks += 2;
        if (!ld_we || ld_addr != 10'(addr) || ld_data != exp3(px)) begin
          failures++; $display("q3 pixel %0d: addr %0d data %h", i, ld_addr, ld_data);
        end
        if (!ld_we2 || ld_addr2 != 10'(addr) || ld_data2 != exp2(px)) begin
          failures++; $display("q2 pixel %0d wrong", i);
        end
        addr++;
        if ($urandom_range(1)) @(negedge clk);
      end
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
