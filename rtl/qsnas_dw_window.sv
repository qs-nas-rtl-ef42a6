// qsnas_dw_window: K x K patch buffer for depthwise convolution.
//
// A depthwise layer is processed one channel per PE.  The input fmap is
// read one pixel per clock, column by column: K consecutive loads bring in
// the K pixels (rows top to bottom) of the next input column.  The first
// K-1 of them wait in a column buffer; with the K-th, the K x K array of
// flip-flops shifts left by one column and takes the new column on its
// right.  The patch therefore advances by one output position every K
// clocks, and the PE multiplies it with the K x K weights held in one
// weight-memory entry.  patch is row-major (entry ky*K + kx) and is valid
// in the clock after the K-th load.  The load count restarts at reset and
// stays aligned because the controller always loads whole columns.
module qsnas_dw_window #(
  parameter int Q = 3,   // activation width
  parameter int K = 3    // kernel size
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [Q-1:0]         din,
  output logic [K*K-1:0][Q-1:0] patch
);

  localparam int CW = (K > 1) ? $clog2(K) : 1;

  logic [Q-1:0]  col [K];        // column being assembled (entry K-1 unused)
  logic [Q-1:0]  win [K][K];     // win[ky][kx]
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < K; i++) begin
        col[i] <= '0;
        for (int j = 0; j < K; j++) win[i][j] <= '0;
      end
    end else if (load) begin
      if (int'(cnt) < K - 1) begin
        col[cnt] <= din;
        cnt      <= cnt + 1'b1;
      end else begin
        for (int ky = 0; ky < K; ky++) begin
          for (int kx = 0; kx < K - 1; kx++) win[ky][kx] <= win[ky][kx+1];
          win[ky][K-1] <= (ky < K - 1) ? col[ky] : din;
        end
        cnt <= '0;
      end
    end
  end

  always_comb begin
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        patch[ky*K + kx] = win[ky][kx];
  end

endmodule
