// qsnas_pkg: types and constants shared by the QS-NAS accelerator.
//
// The accelerator runs one CNN layer at a time from a table of layer
// descriptors.  A descriptor names the layer type (vanilla CONV/FC, the
// heterogeneously quantized first layer, a depthwise layer or a global
// average pool), the input
// fmap size, a square kernel size, padding, stride 1 or 2, optional 2x2
// max-pool, and where
// the layer's weights and batch-norm parameters start.  FC layers are
// convolutions whose kernel covers the whole input ("valid" size).
// The descriptor format, the issue tag and the field widths are this
// design's own choices; the first three layer types are the ones the
// accelerator is built around, and the average pool ends a MobileNet.
package qsnas_pkg;

  // Layer kinds handled by the same PE pipeline.
  typedef enum logic [1:0] {
    L_CONV  = 2'd0,   // vanilla CONV or FC layer, q-bit x q-bit
    L_FIRST = 2'd1,   // first layer: 8-bit pixels split into q-bit chunks
    L_DW    = 2'd2,   // depthwise KxK layer, one channel per PE
    L_AVG   = 2'd3    // global average pool, one channel per PE
  } ltype_e;

  localparam int ADDR_W = 16;   // width of fmap / weight address fields
  localparam int BNA_W  = 8;    // width of batch-norm parameter addresses

  // One entry of the layer table.
  typedef struct packed {
    ltype_e             ltype;
    logic [7:0]         h;        // input fmap height
    logic [7:0]         w;        // input fmap width
    logic [2:0]         k;        // square kernel size (1..7)
    logic               pad;      // 1: zero padding of (k-1)/2, else none
    logic               stride2;  // 1: stride 2, else stride 1
    logic               pool;     // 2x2 max-pool after the activation
    logic               last;     // classification layer: raw BN output, no ReLU
    logic [7:0]         cg;       // input channel groups (fmap entries per pixel)
    logic [7:0]         ng;       // output filter groups (passes of P filters)
    logic [ADDR_W-1:0]  w_base;   // first weight sub-bank entry of the layer
    logic [BNA_W-1:0]   bn_base;  // first batch-norm parameter entry
  } layer_desc_t;

  // Tag travelling with every fmap/weight read through the PE pipeline.
  typedef struct packed {
    logic               valid;    // a read was issued this cycle
    ltype_e             ltype;
    logic               zero;     // padding position: activation is zero
    logic               first;    // first term of an accumulation
    logic               last;     // last term: the output is complete
    logic               dw_fire;  // depthwise: patch complete, multiply it
    logic               pool;     // output goes through the max-pool
    logic               psub0;    // first of the four values of a pool patch
    logic               raw;      // classification layer output
    logic [ADDR_W-1:0]  out_addr; // fmap entry (or result index) to write
    logic [BNA_W-1:0]   bn_addr;  // batch-norm parameter entry
  } issue_t;

  // Number of q-bit chunks an 8-bit input pixel is split into.
  function automatic int nchunk(input int q);
    return (8 + q - 1) / q;
  endfunction

endpackage
