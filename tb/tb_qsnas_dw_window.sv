// tb_qsnas_dw_window: the depthwise K x K patch buffer.
// Rows of a random 3 x 12 input strip are streamed column by column, three
// pixels (top to bottom) per column, with idle clocks in between.  After
// every third load the patch must equal the 3 x 3 window whose right
// column is the one just loaded, row-major.
module tb_qsnas_dw_window;
  localparam int K = 3, W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0;
  logic [2:0] din = '0;
  logic [K*K-1:0][2:0] patch;
  int img [K][W];

  qsnas_dw_window #(.Q(3), .K(K)) dut (.*);

  initial begin
    for (int y = 0; y < K; y++) for (int x = 0; x < W; x++) img[y][x] = int'($urandom_range(7));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < W; c++) begin
      for (int ky = 0; ky < K; ky++) begin
        @(negedge clk);
        load = 1; din = 3'(img[ky][c]);
        @(negedge clk);
        load = 0;
        if ($urandom_range(1)) @(negedge clk);
      end
      if (c >= K - 1) begin
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) begin
            checks++;
            if (patch[ky*K + kx] != 3'(img[ky][c - K + 1 + kx])) begin
              failures++;
              $display("col %0d patch[%0d][%0d]=%0d expected %0d", c, ky, kx,
                       patch[ky*K + kx], img[ky][c - K + 1 + kx]);
            end
          end
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
