// tb_qsnas_vgg: one complete inference of the VGG-like CIFAR-10/SVHN
// network scaled to s = 1/2 with q = 3, on the accelerator at its default
// size (q = 3, P = M = 32):
//   (in 32x32x3) - 2 x (32 C3x3) - pool - 2 x (64 C3x3) - pool
//   - 2 x (128 C3x3) - pool - 2 x (256 FC) - 10 FC
// The first FC layer is a 4x4 "valid" convolution of the 4x4x128 fmap.
// Weights (random 3-bit), batch-norm parameters and the image are
// generated here; an integer reference model on plain tensors checks every
// fmap word written by every layer and the ten class scores.  The weights
// fill 872 of the 1024 entries of each PE's sub-bank, and the largest fmap
// (32x32x32) fills the 1024 words of an fmap memory.  The run time must be
// one fmap read per clock (46,664 reads) plus setup and drain per layer.
module tb_qsnas_vgg;
  import qsnas_pkg::*;

  localparam int Q = 3, P = 32, M = 32, NCH = 3, FRAC = 8;
  localparam int NL = 9;
  localparam int DRAIN = 16 + $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic pix_valid = 0, pix_sof = 0;
  logic [23:0] pix_data = '0;
  logic wl_we = 0; logic [4:0] wl_pe = '0; logic [9:0] wl_addr = '0; logic [M*Q-1:0] wl_data = '0;
  logic bl_we = 0; logic [4:0] bl_pe = '0; logic [7:0] bl_addr = '0;
  logic signed [31:0] bl_alpha = '0; logic signed [15:0] bl_zeta = '0;
  logic dl_we = 0; logic [4:0] dl_addr = '0; layer_desc_t dl_data = '0;
  logic start = 0; logic [5:0] num_layers = '0;
  logic busy, done; logic [4:0] layer;
  logic res_valid; logic [ADDR_W-1:0] res_addr; logic signed [P-1:0][31:0] res_data;

  qsnas_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ network
  typedef struct { ltype_e t; int h, w, c, n, k, pad, pool, last, st; } lspec_t;
  lspec_t L [NL];
  int cgs[NL], ngs[NL], ohs[NL], ows[NL], fh[NL], fw[NL], wbase[NL], bnb[NL];

  int img [32][32][3];
  int act [NL+1][32][32][256];          // act[l] = input of layer l
  int wt  [NL][256][16][256];          // wt[l][n][ky*K+kx][c]; DW: c = 0
  int alpha [NL][256], zeta [NL][256];
  int raw_ref [256];
  int acc [256][32][32];
  int n_clip_lo = 0, n_clip_hi = 0;

  function automatic int bnq(int x, int al, int ze, output int raw);
    longint y;
    y = (longint'(x - al) * ze) >>> FRAC;
    raw = int'(y);
    if (y < 0) return 0;
    if (y > 7) return 7;
    return int'(y);
  endfunction

  task automatic reference();
    for (int l = 0; l < NL; l++) begin
      int pd, oh, ow, nn;
      pd = L[l].pad ? (L[l].k - 1) / 2 : 0;
      oh = (L[l].h + 2*pd - L[l].k) / L[l].st + 1;
      ow = (L[l].w + 2*pd - L[l].k) / L[l].st + 1;
      nn = (L[l].t == L_DW) ? L[l].c : L[l].n;
      for (int n = 0; n < nn; n++)
        for (int y = 0; y < oh; y++)
          for (int x = 0; x < ow; x++) begin
            int s = 0;
            for (int ky = 0; ky < L[l].k; ky++)
              for (int kx = 0; kx < L[l].k; kx++) begin
                int iy = y * L[l].st + ky - pd, ix = x * L[l].st + kx - pd;
                if (iy < 0 || iy >= L[l].h || ix < 0 || ix >= L[l].w) continue;
                if (L[l].t == L_DW)
                  s += act[l][iy][ix][n] * wt[l][n][ky*L[l].k+kx][0];
                else
                  for (int c = 0; c < L[l].c; c++)
                    s += act[l][iy][ix][c] * wt[l][n][ky*L[l].k+kx][c];
              end
            acc[n][y][x] = s;
          end
      // batch-norm parameters from the accumulator range
      for (int n = 0; n < nn; n++) begin
        int mn = acc[n][0][0], mx = acc[n][0][0];
        for (int y = 0; y < oh; y++)
          for (int x = 0; x < ow; x++) begin
            if (acc[n][y][x] < mn) mn = acc[n][y][x];
            if (acc[n][y][x] > mx) mx = acc[n][y][x];
          end
        if (L[l].last) begin
          alpha[l][n] = 0; zeta[l][n] = 1 << FRAC;
        end else begin
          alpha[l][n] = mn + (mx - mn) / 5;
          zeta[l][n]  = (10 << FRAC) / (mx - mn + 1) + 1;
          if (zeta[l][n] > 32767) zeta[l][n] = 32767;
        end
      end
      // activation, pool
      for (int n = 0; n < nn; n++)
        for (int y = 0; y < fh[l]; y++)
          for (int x = 0; x < fw[l]; x++) begin
            int v, r;
            if (L[l].pool) begin
              v = 0;
              for (int d = 0; d < 4; d++) begin
                int t = bnq(acc[n][2*y + d/2][2*x + d%2], alpha[l][n], zeta[l][n], r);
                if (t > v) v = t;
              end
            end else begin
              v = bnq(acc[n][y][x], alpha[l][n], zeta[l][n], r);
              if (r < 0) n_clip_lo++;
              if (r > 7) n_clip_hi++;
            end
            if (L[l].last) raw_ref[n] = r;
            act[l+1][y][x][n] = v;
          end
    end
  endtask

  // expected fmap word written by layer l at address a
  function automatic logic [M*Q-1:0] exp_word(int l, int a);
    logic [M*Q-1:0] wv = '0;
    int pix, g, y, x, n;
    if (L[l].t == L_DW) begin pix = a / cgs[l]; g = a % cgs[l]; end
    else begin pix = a / ngs[l]; g = a % ngs[l]; end
    y = pix / fw[l]; x = pix % fw[l];
    for (int p = 0; p < P; p++) begin
      n = g * P + p;
      if (n < ((L[l].t == L_DW) ? L[l].c : L[l].n)) wv[p*Q +: Q] = Q'(act[l+1][y][x][n]);
    end
    return wv;
  endfunction

  // ------------------------------------------------------------ loading
  task automatic load_all();
    int wb = 0;
    for (int l = 0; l < NL; l++) begin
      layer_desc_t dd = '0;
      wbase[l] = wb; bnb[l] = (l == 0) ? 0 : bnb[l-1] + ((L[l-1].t == L_DW) ? cgs[l-1] : ngs[l-1]);
      dd.ltype = L[l].t; dd.h = 8'(L[l].h); dd.w = 8'(L[l].w); dd.k = 3'(L[l].k);
      dd.pad = L[l].pad[0]; dd.stride2 = (L[l].st == 2); dd.pool = L[l].pool[0]; dd.last = L[l].last[0];
      dd.cg = 8'(cgs[l]); dd.ng = 8'(ngs[l]); dd.w_base = ADDR_W'(wb); dd.bn_base = BNA_W'(bnb[l]);
      @(negedge clk); dl_we = 1; dl_addr = 5'(l); dl_data = dd;
      @(negedge clk); dl_we = 0;
      for (int p = 0; p < P; p++) begin
        if (L[l].t == L_DW) begin
          for (int g = 0; g < cgs[l]; g++) begin
            logic [M*Q-1:0] wv = '0;
            int c = g * M + p;
            if (c < L[l].c)
              for (int i = 0; i < L[l].k * L[l].k; i++) wv[i*Q +: Q] = Q'(wt[l][c][i][0]);
            @(negedge clk); wl_we = 1; wl_pe = 5'(p); wl_addr = 10'(wb + g); wl_data = wv;
          end
        end else begin
          for (int g = 0; g < ngs[l]; g++) begin
            int n = g * P + p;
            for (int kk = 0; kk < L[l].k * L[l].k; kk++)
              for (int cg = 0; cg < cgs[l]; cg++) begin
                logic [M*Q-1:0] wv = '0;
                if (n < L[l].n) begin
                  if (L[l].t == L_FIRST) begin
                    for (int c = 0; c < 3; c++)
                      for (int j = 0; j < NCH; j++) wv[(c*NCH + j)*Q +: Q] = Q'(wt[l][n][kk][c]);
                  end else begin
                    for (int i = 0; i < M; i++)
                      if (cg*M + i < L[l].c) wv[i*Q +: Q] = Q'(wt[l][n][kk][cg*M + i]);
                  end
                end
                @(negedge clk); wl_we = 1; wl_pe = 5'(p);
                wl_addr = 10'(wb + g*L[l].k*L[l].k*cgs[l] + kk*cgs[l] + cg); wl_data = wv;
              end
          end
        end
        // batch-norm parameters
        for (int g = 0; g < ((L[l].t == L_DW) ? cgs[l] : ngs[l]); g++) begin
          int n = g * P + p;
          @(negedge clk); wl_we = 0; bl_we = 1; bl_pe = 5'(p); bl_addr = 8'(bnb[l] + g);
          bl_alpha = (n < 256) ? alpha[l][n] : 0; bl_zeta = (n < 256) ? 16'(zeta[l][n]) : '0;
          if (n >= ((L[l].t == L_DW) ? L[l].c : L[l].n)) begin bl_alpha = 0; bl_zeta = 0; end
        end
        @(negedge clk); wl_we = 0; bl_we = 0;
      end
      wb += (L[l].t == L_DW) ? cgs[l] : ngs[l] * L[l].k * L[l].k * cgs[l];
    end
    // image
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        @(negedge clk); pix_valid = 1; pix_sof = (y == 0 && x == 0);
        pix_data = {8'(img[y][x][2]), 8'(img[y][x][1]), 8'(img[y][x][0])};
      end
    @(negedge clk); pix_valid = 0; pix_sof = 0;
  endtask

  // ----------------------------------------------------------- monitors
  int n_zero = 0, n_first = 0, n_fire = 0, n_pool = 0, n_swap = 0, n_res = 0;
  int n_writes [NL];
  int busy_cycles = 0, exp_cycles = 0;
  logic sel_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.iss.valid && dut.iss.zero) n_zero++;
    if (dut.iss.valid && dut.iss.ltype == L_FIRST) n_first++;
    if (dut.iss.valid && dut.iss.dw_fire) n_fire++;
    if (dut.g_pe[0].u_pe.u_pool.out_valid) n_pool++;
    if (dut.sel != sel_q) n_swap++;
    sel_q <= dut.sel;
    if (busy) busy_cycles++;
    if (dut.fwe) begin
      logic [M*Q-1:0] e;
      e = exp_word(int'(layer), int'(dut.fwaddr));
      n_writes[layer]++;
      checks++;
      if (dut.fwdata !== e) begin
        failures++;
        if (failures < 10)
          $display("layer %0d addr %0d: got %h expected %h", layer, dut.fwaddr, dut.fwdata, e);
      end
    end
    if (res_valid) begin
      n_res++;
      for (int p = 0; p < P; p++) begin
        int n;
        n = int'(res_addr) * P + p;
        if (n < L[NL-1].n) begin
          checks++;
          if (res_data[p] != raw_ref[n]) begin
            failures++;
            $display("result %0d: got %0d expected %0d", n, $signed(res_data[p]), raw_ref[n]);
          end
        end
      end
    end
  end

  initial begin
    #(10 * 1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    L[0] = '{L_FIRST, 32, 32,   3,  32, 3, 1, 0, 0, 1};
    L[1] = '{L_CONV,  32, 32,  32,  32, 3, 1, 1, 0, 1};
    L[2] = '{L_CONV,  16, 16,  32,  64, 3, 1, 0, 0, 1};
    L[3] = '{L_CONV,  16, 16,  64,  64, 3, 1, 1, 0, 1};
    L[4] = '{L_CONV,   8,  8,  64, 128, 3, 1, 0, 0, 1};
    L[5] = '{L_CONV,   8,  8, 128, 128, 3, 1, 1, 0, 1};
    L[6] = '{L_CONV,   4,  4, 128, 256, 4, 0, 0, 0, 1};
    L[7] = '{L_CONV,   1,  1, 256, 256, 1, 0, 0, 0, 1};
    L[8] = '{L_CONV,   1,  1, 256,  10, 1, 0, 0, 1, 1};
    for (int l = 0; l < NL; l++) begin
      int pd;
      pd = L[l].pad ? (L[l].k - 1) / 2 : 0;
      cgs[l] = (L[l].t == L_FIRST) ? 1 : (L[l].c + M - 1) / M;
      ngs[l] = (L[l].n + P - 1) / P;
      ohs[l] = (L[l].h + 2*pd - L[l].k) / L[l].st + 1; ows[l] = (L[l].w + 2*pd - L[l].k) / L[l].st + 1;
      fh[l] = L[l].pool ? ohs[l] / 2 : ohs[l]; fw[l] = L[l].pool ? ows[l] / 2 : ows[l];
      n_writes[l] = 0;
      if (L[l].t == L_DW) exp_cycles += cgs[l] * ohs[l] * (L[l].w + 2*pd) * L[l].k;
      else exp_cycles += ngs[l] * ohs[l] * ows[l] * L[l].k * L[l].k * cgs[l];
      exp_cycles += DRAIN + 2;
    end
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) for (int c = 0; c < 3; c++) begin
      img[y][x][c] = int'($urandom_range(255));
      act[0][y][x][c] = img[y][x][c];
    end
    for (int l = 0; l < NL; l++)
      for (int n = 0; n < L[l].n; n++) for (int i = 0; i < 16; i++) for (int c = 0; c < L[l].c; c++)
        wt[l][n][i][c] = int'($urandom_range(7)) - 4;
    reference();

    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();
    @(negedge clk); start = 1; num_layers = 6'(NL);
    @(negedge clk); start = 0;
    wait (done);
    repeat (5) @(negedge clk);

    for (int l = 0; l < NL - 1; l++) begin
      int words;
      words = fh[l] * fw[l] * ((L[l].t == L_DW) ? cgs[l] : ngs[l]);
      checks++;
      if (n_writes[l] != words) begin
        failures++; $display("layer %0d wrote %0d words, expected %0d", l, n_writes[l], words);
      end
    end
    checks++;
    if (wbase[NL-1] + ngs[NL-1] * cgs[NL-1] != 872) begin
      failures++; $display("weights use %0d entries", wbase[NL-1] + ngs[NL-1] * cgs[NL-1]);
    end
    checks++;
    if (busy_cycles != exp_cycles) begin
      failures++; $display("run took %0d cycles, expected %0d", busy_cycles, exp_cycles);
    end
    $display("cycles=%0d pad_reads=%0d first_reads=%0d dw_patches=%0d pool_outputs=%0d relu_clip_lo=%0d relu_clip_hi=%0d swaps=%0d result_words=%0d",
             busy_cycles, n_zero, n_first, n_fire, n_pool, n_clip_lo, n_clip_hi, n_swap, n_res);
    checks++; if (n_zero  == 0) begin failures++; $display("no padding read"); end
    checks++; if (n_first == 0) begin failures++; $display("no first-layer read"); end
        checks++; if (n_pool  == 0) begin failures++; $display("no pool output"); end
    checks++; if (n_clip_lo == 0 || n_clip_hi == 0) begin failures++; $display("ReLU never clipped"); end
    checks++; if (n_swap  != NL) begin failures++; $display("bank swaps %0d", n_swap); end
    checks++; if (n_res   == 0) begin failures++; $display("no result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
