// qsnas_top: the QS-NAS accelerator HW<P, M> for a network NN<q, s>.
//
// P processing engines, each with M q-bit multipliers and its own weight
// sub-bank, work in lock step on fmap words read from one of two ping-pong
// fmap memories and write the P output channels they produce, packed into
// one word, into the other.  A controller walks the layer table; an input
// loader writes the image, one 24-bit RGB pixel per clock, into fmap bank 0.
// The whole network (weights, batch-norm parameters, fmaps) stays on chip:
// weights and parameters are written once through the load ports before
// inference, as the accelerator assumes.
//
// Default size: q = 3, P = M = 32 and memories of depth 1024, the
// energy-optimal configuration found for the VGG-like network scaled to
// s = 1/2 (P = M = 64s; 1024-deep sub-banks hold that network).
//
// Interface: load weights (wl_*: PE index, entry, M*q-bit word), batch-norm
// parameters (bl_*) and layer descriptors (dl_*), stream an image in
// (pix_*), pulse start with num_layers.  Results of the layer marked `last`
// leave on res_* (one word of P signed values per filter group, res_addr =
// filter group), and done pulses when the last layer has been written.
// Requires P == M: a PE's outputs fill exactly one fmap word and a
// depthwise PE takes the fmap lane of its own index (this design's choice;
// every configuration the accelerator was evaluated in has P == M).
module qsnas_top
  import qsnas_pkg::*;
#(
  parameter int Q          = 3,
  parameter int P          = 32,
  parameter int M          = 32,
  parameter int WDEPTH     = 1024,
  parameter int FDEPTH     = 1024,
  parameter int BN_DEPTH   = 64,
  parameter int MAX_LAYERS = 32,
  parameter int ACC_W      = 32,
  parameter int ZW         = 16,
  parameter int FRAC       = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // image input, 24 pins
  input  logic                          pix_valid,
  input  logic                          pix_sof,
  input  logic [23:0]                   pix_data,
  // weight load
  input  logic                          wl_we,
  input  logic [$clog2(P)-1:0]          wl_pe,
  input  logic [$clog2(WDEPTH)-1:0]     wl_addr,
  input  logic [M*Q-1:0]                wl_data,
  // batch-norm parameter load
  input  logic                          bl_we,
  input  logic [$clog2(P)-1:0]          bl_pe,
  input  logic [BNA_W-1:0]              bl_addr,
  input  logic signed [ACC_W-1:0]       bl_alpha,
  input  logic signed [ZW-1:0]          bl_zeta,
  // layer table load
  input  logic                          dl_we,
  input  logic [$clog2(MAX_LAYERS)-1:0] dl_addr,
  input  layer_desc_t                   dl_data,
  // run control
  input  logic                          start,
  input  logic [$clog2(MAX_LAYERS):0]   num_layers,
  output logic                          busy,
  output logic                          done,
  output logic [$clog2(MAX_LAYERS)-1:0] layer,       // layer being run
  // classification output
  output logic                          res_valid,
  output logic [ADDR_W-1:0]             res_addr,
  output logic signed [P-1:0][ACC_W-1:0] res_data
);

  localparam int WAW   = $clog2(WDEPTH);
  localparam int FAW   = $clog2(FDEPTH);
  localparam int DRAIN = 16 + $clog2(M);

  initial assert (P == M) else $error("qsnas_top needs P == M (P=%0d M=%0d)", P, M);

  // ------------------------------------------------------------ control
  issue_t                  iss;
  logic [ADDR_W-1:0]       f_raddr, w_raddr;
  logic                    sel;

  qsnas_controller #(.MAX_LAYERS(MAX_LAYERS), .DRAIN(DRAIN)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .dl_we      (dl_we),
    .dl_addr    (dl_addr),
    .dl_data    (dl_data),
    .start      (start),
    .num_layers (num_layers),
    .busy       (busy),
    .done       (done),
    .layer      (layer),
    .sel        (sel),
    .iss        (iss),
    .f_raddr    (f_raddr),
    .w_raddr    (w_raddr)
  );

  // ------------------------------------------------------ fmap memories
  logic           ld_we;
  logic [FAW-1:0] ld_addr;
  logic [M*Q-1:0] ld_data;
  logic [M*Q-1:0] fdata;
  logic           fwe;
  logic [FAW-1:0] fwaddr;
  logic [M*Q-1:0] fwdata;

  qsnas_input_loader #(.Q(Q), .M(M), .DEPTH(FDEPTH)) u_load (
    .clk       (clk),
    .rst_n     (rst_n),
    .pix_valid (pix_valid && !busy),
    .pix_sof   (pix_sof),
    .pix_data  (pix_data),
    .ld_we     (ld_we),
    .ld_addr   (ld_addr),
    .ld_data   (ld_data)
  );

  qsnas_fmap_pingpong #(.M(M), .Q(Q), .DEPTH(FDEPTH)) u_fmap (
    .clk     (clk),
    .sel     (sel),
    .raddr   (f_raddr[FAW-1:0]),
    .rdata   (fdata),
    .we      (fwe),
    .waddr   (fwaddr),
    .wdata   (fwdata),
    .ld_we   (ld_we),
    .ld_addr (ld_addr),
    .ld_data (ld_data)
  );

  // ----------------------------------------------------------- PE array
  logic                    pe_valid  [P];
  logic [Q-1:0]            pe_q      [P];
  logic signed [ACC_W-1:0] pe_raw    [P];
  logic                    pe_is_raw [P];
  logic [ADDR_W-1:0]       pe_addr   [P];

  for (genvar p = 0; p < P; p++) begin : g_pe
    qsnas_pe #(
      .Q(Q), .M(M), .WDEPTH(WDEPTH), .BN_DEPTH(BN_DEPTH),
      .ACC_W(ACC_W), .ZW(ZW), .FRAC(FRAC), .KDW(3), .PE_ID(p)
    ) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .wl_we      (wl_we && wl_pe == p),
      .wl_addr    (wl_addr),
      .wl_data    (wl_data),
      .bl_we      (bl_we && bl_pe == p),
      .bl_addr    (bl_addr),
      .bl_alpha   (bl_alpha),
      .bl_zeta    (bl_zeta),
      .iss        (iss),
      .w_raddr    (w_raddr[WAW-1:0]),
      .fdata      (fdata),
      .out_valid  (pe_valid[p]),
      .out_q      (pe_q[p]),
      .out_raw    (pe_raw[p]),
      .out_is_raw (pe_is_raw[p]),
      .out_addr   (pe_addr[p])
    );
  end

  // --------------------------------------------------------- write back
  // All PEs run the same schedule, so PE 0's tag stands for all of them.
  always_comb begin
    fwe    = pe_valid[0] && !pe_is_raw[0];
    fwaddr = pe_addr[0][FAW-1:0];
    fwdata = '0;
    for (int p = 0; p < P; p++) fwdata[p*Q +: Q] = pe_q[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_addr  <= '0;
      res_data  <= '0;
    end else begin
      res_valid <= pe_valid[0] && pe_is_raw[0];
      if (pe_valid[0] && pe_is_raw[0]) begin
        res_addr <= pe_addr[0];
        for (int p = 0; p < P; p++) res_data[p] <= pe_raw[p];
      end
    end
  end

  // All PEs must finish in the same clock.
  for (genvar p = 1; p < P; p++) begin : g_chk
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                 pe_valid[p] == pe_valid[0])
      else $error("PE %0d out of step", p);
  end

endmodule
