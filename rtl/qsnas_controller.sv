// qsnas_controller: layer sequencer of the QS-NAS accelerator.
//
// Holds a table of up to MAX_LAYERS layer descriptors (written through the
// dl_* port) and, after `start`, runs layers 0 .. num_layers-1 one after
// the other.  For each layer it issues one fmap read and one weight read
// per clock, with a tag telling the PEs what to do with the data:
//
//  * CONV/FC and first layer: for each group of P filters, for each output
//    pixel, for each kernel position (ky, kx) and input channel group cg,
//    read fmap word ((iy*W + ix)*CG + cg) and weight word
//    w_base + ng*K*K*CG + (ky*K + kx)*CG + cg.  Positions in the zero
//    padding are tagged `zero`.  One output per K*K*CG clocks per PE, i.e.
//    2*min(N,P)*min(C,M) operations per clock.  With max-pool the output
//    pixels are visited patch by patch (the four pixels of each 2x2 patch
//    in a row), so the pool unit sees them consecutively.
//  * Depthwise: for each channel group, output row and input column, read
//    the K pixels of that column one per clock into the patch buffers; from
//    the K-th column on, every column (every second one at stride 2)
//    completes a patch and fires one output: at stride 1 one output per K
//    clocks, 2*min(C,P)*K operations per clock.
//
// Output fmap word of pixel pix and filter group ng: pix*NG + ng (the
// packing along channels that the next layer reads).  When the last read of
// a layer is issued the controller waits DRAIN clocks for the pipeline to
// empty, then swaps the fmap memories (`sel`) and starts the next layer.
// `done` pulses for one clock after the last layer.  Stride 1 or 2: at
// stride 2 output pixel (oy, ox) reads input (2*oy + ky - pad,
// 2*ox + kx - pad); a depthwise layer still reads every input column, but
// only every other one fires.
// Global average pool: run as a "valid" CONV whose kernel covers the whole
// input (k = h = w, cg = 1), but group ng reads channel group ng of each
// pixel, word pix*NG + ng, so each PE sums its own channel over all pixels.
// The loop orders follow the accelerator's tiling (one output channel per
// PE, input channels across the multipliers); the descriptor table, the
// fixed drain wait and the address formulas are this design's own choices.
module qsnas_controller
  import qsnas_pkg::*;
#(
  parameter int MAX_LAYERS = 32,
  parameter int DRAIN      = 24    // clocks from last issue to last write
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // descriptor table load
  input  logic                          dl_we,
  input  logic [$clog2(MAX_LAYERS)-1:0] dl_addr,
  input  layer_desc_t                   dl_data,
  // run control
  input  logic                          start,
  input  logic [$clog2(MAX_LAYERS):0]   num_layers,
  output logic                          busy,
  output logic                          done,
  output logic [$clog2(MAX_LAYERS)-1:0] layer,
  // fmap bank of the current layer's input
  output logic                          sel,
  // issue
  output issue_t                        iss,
  output logic [ADDR_W-1:0]             f_raddr,
  output logic [ADDR_W-1:0]             w_raddr
);

  localparam int LW = $clog2(MAX_LAYERS);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_RUN, S_DRAIN} state_e;

  layer_desc_t desc [MAX_LAYERS];

  always_ff @(posedge clk) begin
    if (dl_we) desc[dl_addr] <= dl_data;
  end

  state_e      state;
  layer_desc_t d;
  logic [LW:0] li;
  logic [7:0]  drain_cnt;

  // loop counters
  logic [7:0]        ng_c;          // filter group (DW: channel group)
  logic [7:0]        a_c, b_c;      // output (or pool) row / column; DW: b_c = input column
  logic [1:0]        sub_c;         // pixel within a 2x2 pool patch
  logic [2:0]        ky_c, kx_c;
  logic [7:0]        cg_c;
  logic [ADDR_W-1:0] j_c;           // position in the filter: (ky*K+kx)*CG+cg
  logic [ADDR_W-1:0] wgrp;          // ng * K*K*CG

  // derived layer geometry
  logic [3:0]        pd;            // padding
  logic [8:0]        oh, ow;        // convolution output size
  logic [8:0]        a_n, b_n;      // loop bounds of a_c, b_c
  logic [ADDR_W-1:0] kkc;           // K*K*CG
  logic              is_dw, is_avg, pool;

  always_comb begin
    is_dw = (d.ltype == L_DW);
    is_avg = (d.ltype == L_AVG);
    pool  = d.pool && !is_dw;
    pd    = d.pad ? 4'((d.k - 3'd1) >> 1) : 4'd0;
    oh    = ((9'(d.h) + 9'(2 * pd) - 9'(d.k)) >> d.stride2) + 9'd1;
    ow    = ((9'(d.w) + 9'(2 * pd) - 9'(d.k)) >> d.stride2) + 9'd1;
    a_n   = pool ? (oh >> 1) : oh;
    b_n   = is_dw ? 9'(d.w) + 9'(2 * pd) : (pool ? (ow >> 1) : ow);
    kkc   = ADDR_W'(d.k) * ADDR_W'(d.k) * ADDR_W'(d.cg);
  end

  // current read position
  logic signed [10:0] oy, ox, iy, ix;
  logic               zero, fire, last_issue;
  logic signed [10:0] dwc;          // DW: input column minus (K-1)

  always_comb begin
    dwc = 11'(b_c) - 11'(d.k) + 11'sd1;
    if (is_dw) begin
      oy = 11'(a_c);
      ox = dwc >>> d.stride2;
      iy = (oy <<< d.stride2) + 11'(ky_c) - 11'(pd);
      ix = 11'(b_c) - 11'(pd);
    end else begin
      oy = pool ? 11'({a_c, sub_c[1]}) : 11'(a_c);
      ox = pool ? 11'({b_c, sub_c[0]}) : 11'(b_c);
      iy = (oy <<< d.stride2) + 11'(ky_c) - 11'(pd);
      ix = (ox <<< d.stride2) + 11'(kx_c) - 11'(pd);
    end
    zero = (iy < 0) || (iy >= 11'(d.h)) || (ix < 0) || (ix >= 11'(d.w));
    fire = is_dw && (ky_c == d.k - 3'd1) && (dwc >= 0) && !(d.stride2 && dwc[0]);
    if (is_dw)
      last_issue = (ng_c == d.cg - 8'd1) && (9'(a_c) == a_n - 9'd1) &&
                   (9'(b_c) == b_n - 9'd1) && (ky_c == d.k - 3'd1);
    else
      last_issue = (ng_c == d.ng - 8'd1) && (9'(a_c) == a_n - 9'd1) &&
                   (9'(b_c) == b_n - 9'd1) && (sub_c == (pool ? 2'd3 : 2'd0)) &&
                   (j_c == kkc - 1'b1);
  end

  // issue tag, address generation
  always_comb begin
    iss          = '0;
    iss.valid    = (state == S_RUN);
    iss.ltype    = d.ltype;
    iss.zero     = zero;
    iss.pool     = pool;
    iss.psub0    = (sub_c == 2'd0);
    iss.raw      = d.last;
    f_raddr      = zero ? '0 : ADDR_W'((32'(iy) * 32'(d.w) + 32'(ix)) * 32'(d.cg) + 32'(cg_c));
    if (is_avg)
      f_raddr    = ADDR_W'((32'(iy) * 32'(d.w) + 32'(ix)) * 32'(d.ng) + 32'(ng_c));
    if (is_dw) begin
      iss.first    = 1'b1;
      iss.last     = 1'b1;
      iss.dw_fire  = fire;
      iss.out_addr = ADDR_W'((32'(oy) * 32'(ow) + 32'(ox)) * 32'(d.cg) + 32'(ng_c));
      iss.bn_addr  = d.bn_base + BNA_W'(ng_c);
      w_raddr      = d.w_base + ADDR_W'(ng_c);
      f_raddr      = zero ? '0 : ADDR_W'((32'(iy) * 32'(d.w) + 32'(ix)) * 32'(d.cg) + 32'(ng_c));
    end else begin
      iss.first    = (j_c == '0);
      iss.last     = (j_c == kkc - 1'b1);
      iss.out_addr = ADDR_W'((32'(a_c) * 32'(b_n) + 32'(b_c)) * 32'(d.ng) + 32'(ng_c));
      iss.bn_addr  = d.bn_base + BNA_W'(ng_c);
      w_raddr      = d.w_base + wgrp + j_c;
    end
  end

  assign busy  = (state != S_IDLE);
  assign layer = li[LW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      d         <= '0;
      li        <= '0;
      sel       <= 1'b0;
      done      <= 1'b0;
      drain_cnt <= '0;
      ng_c <= '0; a_c <= '0; b_c <= '0; sub_c <= '0;
      ky_c <= '0; kx_c <= '0; cg_c <= '0; j_c <= '0; wgrp <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start && num_layers != 0) begin
            li    <= '0;
            sel   <= 1'b0;
            state <= S_SETUP;
          end
        end
        S_SETUP: begin
          d    <= desc[li[LW-1:0]];
          ng_c <= '0; a_c <= '0; b_c <= '0; sub_c <= '0;
          ky_c <= '0; kx_c <= '0; cg_c <= '0; j_c <= '0; wgrp <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (last_issue) begin
            state     <= S_DRAIN;
            drain_cnt <= 8'(DRAIN);
          end else if (is_dw) begin
            // ky innermost, then input column, output row, channel group
            if (ky_c != d.k - 3'd1) ky_c <= ky_c + 3'd1;
            else begin
              ky_c <= '0;
              if (9'(b_c) != b_n - 9'd1) b_c <= b_c + 8'd1;
              else begin
                b_c <= '0;
                if (9'(a_c) != a_n - 9'd1) a_c <= a_c + 8'd1;
                else begin
                  a_c  <= '0;
                  ng_c <= ng_c + 8'd1;
                end
              end
            end
          end else begin
            // cg innermost, then kx, ky, pool sub-pixel, column, row, group
            if (j_c != kkc - 1'b1) begin
              j_c <= j_c + 1'b1;
              if (cg_c != d.cg - 8'd1) cg_c <= cg_c + 8'd1;
              else begin
                cg_c <= '0;
                if (kx_c != d.k - 3'd1) kx_c <= kx_c + 3'd1;
                else begin
                  kx_c <= '0;
                  ky_c <= ky_c + 3'd1;
                end
              end
            end else begin
              j_c <= '0; cg_c <= '0; kx_c <= '0; ky_c <= '0;
              if (sub_c != (pool ? 2'd3 : 2'd0)) sub_c <= sub_c + 2'd1;
              else begin
                sub_c <= '0;
                if (9'(b_c) != b_n - 9'd1) b_c <= b_c + 8'd1;
                else begin
                  b_c <= '0;
                  if (9'(a_c) != a_n - 9'd1) a_c <= a_c + 8'd1;
                  else begin
                    a_c  <= '0;
                    ng_c <= ng_c + 8'd1;
                    wgrp <= wgrp + kkc;
                  end
                end
              end
            end
          end
        end
        S_DRAIN: begin
          if (drain_cnt != 0) drain_cnt <= drain_cnt - 8'd1;
          else begin
            sel <= ~sel;
            li  <= li + 1'b1;
            if (li + 1'b1 == num_layers) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_SETUP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
