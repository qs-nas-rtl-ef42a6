// tb_qsnas_controller: the layer sequencer's read schedule.
// Six layers are run: a 6x6 CONV with two channel groups, two filter
// groups, 3x3 same padding and max-pool; a 4x5 depthwise 3x3 layer with
// two channel groups; a 3x3 "valid" FC layer; a 7x6 stride-2 CONV and a
// 6x7 stride-2 depthwise layer (odd and even padded widths); and a global
// average pool over a 3x3x(2 groups) fmap.  The expected stream of
// reads (fmap address or padding, weight address, first/last, pool
// sub-pixel, depthwise fire, output address, batch-norm entry) is built
// from plain loop nests and compared with the controller's output in every
// clock.  The time from start to done must equal the number of reads plus
// (DRAIN + 2) per layer, and the bank select must toggle once per layer.
module tb_qsnas_controller;
  import qsnas_pkg::*;
  localparam int DRAIN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic dl_we = 0; logic [4:0] dl_addr = '0; layer_desc_t dl_data = '0;
  logic start = 0; logic [5:0] num_layers = '0;
  logic busy, done, sel; logic [4:0] layer;
  issue_t iss; logic [ADDR_W-1:0] f_raddr, w_raddr;

  qsnas_controller #(.MAX_LAYERS(32), .DRAIN(DRAIN)) dut (.*);

  typedef struct { logic zero, first, last, fire, psub0; int fa, wa, oa, bn; } rd_t;
  rd_t exp_q [$];
  localparam int NLY = 6;
  layer_desc_t ds [NLY];

  task automatic gen(layer_desc_t d);
    int pd, oh, ow, kkc, st;
    pd = d.pad ? (int'(d.k) - 1) / 2 : 0;
    st = d.stride2 ? 2 : 1;
    oh = (int'(d.h) + 2*pd - int'(d.k)) / st + 1;
    ow = (int'(d.w) + 2*pd - int'(d.k)) / st + 1;
    kkc = int'(d.k) * int'(d.k) * int'(d.cg);
    if (d.ltype == L_DW) begin
      for (int g = 0; g < d.cg; g++)
        for (int oy = 0; oy < oh; oy++)
          for (int c = 0; c < int'(d.w) + 2*pd; c++)
            for (int ky = 0; ky < d.k; ky++) begin
              rd_t r;
              int iy, ix;
              iy = oy * st + ky - pd; ix = c - pd;
              r.zero = (iy < 0 || iy >= d.h || ix < 0 || ix >= d.w);
              r.fa = r.zero ? 0 : (iy * d.w + ix) * d.cg + g;
              r.wa = d.w_base + g; r.first = 1; r.last = 1;
              r.fire = (ky == d.k - 1) && (c >= d.k - 1) && ((c - d.k + 1) % st == 0);
              r.oa = r.fire ? (oy * ow + (c - d.k + 1) / st) * d.cg + g : -1;
              r.bn = d.bn_base + g; r.psub0 = 1;
              exp_q.push_back(r);
            end
    end else begin
      int an, bn_, sn;
      an = d.pool ? oh / 2 : oh; bn_ = d.pool ? ow / 2 : ow; sn = d.pool ? 4 : 1;
      for (int g = 0; g < d.ng; g++)
        for (int a = 0; a < an; a++)
          for (int b = 0; b < bn_; b++)
            for (int s = 0; s < sn; s++)
              for (int ky = 0; ky < d.k; ky++)
                for (int kx = 0; kx < d.k; kx++)
                  for (int cg = 0; cg < d.cg; cg++) begin
                    rd_t r;
                    int oy, ox, iy, ix, j;
                    oy = d.pool ? 2*a + s/2 : a; ox = d.pool ? 2*b + s%2 : b;
                    iy = oy * st + ky - pd; ix = ox * st + kx - pd;
                    j = (ky * d.k + kx) * d.cg + cg;
                    r.zero = (iy < 0 || iy >= d.h || ix < 0 || ix >= d.w);
                    r.fa = r.zero ? 0 : (iy * d.w + ix) * d.cg + cg;
                    if (d.ltype == L_AVG) r.fa = (iy * d.w + ix) * d.ng + g;
                    r.wa = d.w_base + g * kkc + j;
                    r.first = (j == 0); r.last = (j == kkc - 1); r.fire = 0;
                    r.oa = (a * bn_ + b) * d.ng + g;
                    r.bn = d.bn_base + g; r.psub0 = (s == 0);
                    exp_q.push_back(r);
                  end
    end
  endtask

  int n_issue = 0, cycles = 0, swaps = 0;
  logic sel_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (sel != sel_q) swaps++;
    sel_q <= sel;
    if (iss.valid) begin
      rd_t r;
      n_issue++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("extra read"); end
      else begin
        r = exp_q.pop_front();
        if (iss.zero != r.zero || (!r.zero && int'(f_raddr) != r.fa) || int'(w_raddr) != r.wa ||
            iss.first != r.first || iss.last != r.last || iss.dw_fire != r.fire ||
            (r.oa >= 0 && int'(iss.out_addr) != r.oa) || int'(iss.bn_addr) != r.bn ||
            (iss.ltype != L_DW && iss.psub0 != r.psub0)) begin
          failures++;
          if (failures < 10)
            $display("read %0d: zero %0b/%0b fa %0d/%0d wa %0d/%0d first %0b/%0b last %0b/%0b fire %0b/%0b oa %0d/%0d",
                     n_issue, iss.zero, r.zero, f_raddr, r.fa, w_raddr, r.wa, iss.first, r.first,
                     iss.last, r.last, iss.dw_fire, r.fire, iss.out_addr, r.oa);
        end
      end
    end
  end

  initial begin
    ds[0] = '{ltype: L_CONV, h: 6, w: 6, k: 3, pad: 1, stride2: 0, pool: 1, last: 0, cg: 2, ng: 2, w_base: 5, bn_base: 1};
    ds[1] = '{ltype: L_DW,   h: 4, w: 5, k: 3, pad: 1, stride2: 0, pool: 0, last: 0, cg: 2, ng: 2, w_base: 100, bn_base: 3};
    ds[2] = '{ltype: L_CONV, h: 3, w: 3, k: 3, pad: 0, stride2: 0, pool: 0, last: 0, cg: 1, ng: 3, w_base: 200, bn_base: 5};
    ds[3] = '{ltype: L_CONV, h: 7, w: 6, k: 3, pad: 1, stride2: 1, pool: 0, last: 0, cg: 2, ng: 2, w_base: 300, bn_base: 8};
    ds[4] = '{ltype: L_DW,   h: 6, w: 7, k: 3, pad: 1, stride2: 1, pool: 0, last: 0, cg: 2, ng: 2, w_base: 400, bn_base: 10};
    ds[5] = '{ltype: L_AVG,  h: 3, w: 3, k: 3, pad: 0, stride2: 0, pool: 0, last: 1, cg: 1, ng: 2, w_base: 500, bn_base: 12};
    for (int l = 0; l < NLY; l++) gen(ds[l]);
    begin
      int total, exp_cycles;
      total = exp_q.size();
      exp_cycles = total + NLY * (DRAIN + 2);
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int l = 0; l < NLY; l++) begin
        @(negedge clk); dl_we = 1; dl_addr = 5'(l); dl_data = ds[l];
      end
      @(negedge clk); dl_we = 0; start = 1; num_layers = NLY;
      @(negedge clk); start = 0;
      wait (done);
      repeat (3) @(negedge clk);
      checks += 3;
      if (n_issue != total) begin failures++; $display("%0d reads, expected %0d", n_issue, total); end
      if (cycles != exp_cycles) begin failures++; $display("%0d cycles, expected %0d", cycles, exp_cycles); end
      if (swaps != NLY) begin failures++; $display("%0d bank swaps", swaps); end
    end
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
