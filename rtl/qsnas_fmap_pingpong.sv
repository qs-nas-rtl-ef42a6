// qsnas_fmap_pingpong: the input and output fmap memories.
//
// Two block memories of M*q bits by DEPTH words hold the feature maps.
// While a layer runs, bank `sel` is its input (read port) and the other
// bank receives its output (write port); the controller flips `sel` when a
// layer has finished, so each layer's output becomes the next one's input
// without any copy.  An fmap is packed along its channels: one word holds M
// channels of one pixel, and a pixel with more channels takes several
// consecutive words.  The load port writes an input image into bank 0
// (it has priority over the layer write port, but the two are never used
// together).  Read data appears one clock after raddr.
module qsnas_fmap_pingpong #(
  parameter int M     = 32,
  parameter int Q     = 3,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     sel,      // bank read as layer input
  // layer read port (input fmap)
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [M*Q-1:0]           rdata,
  // layer write port (output fmap, goes to bank !sel)
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [M*Q-1:0]           wdata,
  // image load port (bank 0)
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  logic [M*Q-1:0]           ld_data
);

  localparam int AW = $clog2(DEPTH);

  logic           bwe   [2];
  logic [AW-1:0]  bwaddr[2];
  logic [M*Q-1:0] bwdata[2];
  logic [M*Q-1:0] brdata[2];
  logic           sel_q;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (ld_we && b == 0) begin
        bwe[b]    = 1'b1;
        bwaddr[b] = ld_addr;
        bwdata[b] = ld_data;
      end else begin
        bwe[b]    = we && (b != int'(sel));
        bwaddr[b] = waddr;
        bwdata[b] = wdata;
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    qsnas_sram #(.WIDTH(M*Q), .DEPTH(DEPTH)) u_mem (
      .clk   (clk),
      .we    (bwe[b]),
      .waddr (bwaddr[b]),
      .wdata (bwdata[b]),
      .raddr (raddr),
      .rdata (brdata[b])
    );
  end

  // The read data belongs to the bank selected when the address was given.
  always_ff @(posedge clk) sel_q <= sel;
  assign rdata = brdata[sel_q];

endmodule
