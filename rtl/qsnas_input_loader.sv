// qsnas_input_loader: loads the input image into the fmap memory.
//
// The image arrives over a 24-pin port, one RGB pixel (3 x 8 bits, channel
// c in bits [8c+7:8c]) per clock while pix_valid is high; pix_sof marks the
// first pixel of an image and restarts the address at 0.  Each 8-bit value
// is split into NCHUNK = ceil(8/q) chunks of q bits (LSB chunk first), and
// lane c*NCHUNK + j of the fmap word receives chunk j of channel c; the
// other lanes are zero.  So for q = 3 a pixel takes 9 bits.  This is the
// layout the first layer's chunked multiplication reads.  The word is
// written one clock after the pixel arrives; pixels are stored in raster
// order, one word each.
module qsnas_input_loader #(
  parameter int Q     = 3,
  parameter int M     = 32,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pix_valid,
  input  logic                     pix_sof,
  input  logic [23:0]              pix_data,
  output logic                     ld_we,
  output logic [$clog2(DEPTH)-1:0] ld_addr,
  output logic [M*Q-1:0]           ld_data
);

  localparam int NCH = qsnas_pkg::nchunk(Q);
  localparam int AW  = $clog2(DEPTH);

  initial assert (3 * NCH <= M)
    else $error("M=%0d lanes cannot hold 3 channels of %0d chunks", M, NCH);

  logic [AW-1:0]  next_addr;
  logic [M*Q-1:0] word;

  always_comb begin
    logic [NCH*Q-1:0] ext;
    word = '0;
    for (int c = 0; c < 3; c++) begin
      ext = (NCH*Q)'(pix_data[8*c +: 8]);
      for (int j = 0; j < NCH; j++)
        if ((c*NCH + j) < M)
          word[(c*NCH + j)*Q +: Q] = ext[j*Q +: Q];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_addr <= '0;
      ld_we     <= 1'b0;
      ld_addr   <= '0;
      ld_data   <= '0;
    end else begin
      ld_we <= pix_valid;
      if (pix_valid) begin
        ld_addr   <= pix_sof ? '0 : next_addr;
        next_addr <= (pix_sof ? '0 : next_addr) + 1'b1;
        ld_data   <= word;
      end
    end
  end

endmodule
