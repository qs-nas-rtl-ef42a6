// qsnas_sram: on-chip block memory, one write port and one read port.
//
// Models the FPGA block RAMs that hold the weight sub-banks and the fmap
// memories.  Writes happen on the clock edge when we is high; a read
// returns the word at raddr one clock later (registered output, as a BRAM).
// Reading and writing the same address in one clock returns the old word.
// The contents are not reset.
module qsnas_sram #(
  parameter int WIDTH = 96,    // word width (M * q)
  parameter int DEPTH = 1024   // number of words
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
