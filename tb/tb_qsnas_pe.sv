// tb_qsnas_pe: one processing engine (q = 3, M = 16) driven directly.
// A local fmap array with a registered read stands in for the fmap memory.
// Four phases, each compared with an integer model:
//   1. CONV: outputs of 1..6 accumulated dot products of random words;
//      raw output (zeta = 1.0, alpha = 0) must equal the dot-product sum,
//      and the quantized output its clamp to [0, 7].
//   2. First layer: words of 3-bit chunks of three 8-bit pixels, weights
//      copied per chunk; the result must be the 8-bit x 3-bit products.
//   3. Depthwise: columns of three pixels taken from lane PE_ID = 5; every
//      fire multiplies the 3x3 patch with the 9 weights of one word.
//   4. Max-pool: groups of four quantized outputs reduce to their maximum.
// Results must arrive in order with their output addresses.
module tb_qsnas_pe;
  import qsnas_pkg::*;
  localparam int Q = 3, M = 16, ID = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wl_we = 0; logic [9:0] wl_addr = '0; logic [M*Q-1:0] wl_data = '0;
  logic bl_we = 0; logic [7:0] bl_addr = '0; logic signed [31:0] bl_alpha = '0; logic signed [15:0] bl_zeta = '0;
  issue_t iss = '0; logic [9:0] w_raddr = '0; logic [M*Q-1:0] fdata;
  logic out_valid, out_is_raw; logic [Q-1:0] out_q; logic signed [31:0] out_raw; logic [ADDR_W-1:0] out_addr;

  qsnas_pe #(.Q(Q), .M(M), .PE_ID(ID)) dut (.*);

  logic [M*Q-1:0] fm [256];
  logic [M*Q-1:0] wm [256];
  logic [7:0] f_ra = '0;
  always_ff @(posedge clk) fdata <= fm[f_ra];

  typedef struct { int raw; int q; int addr; logic is_raw; } res_t;
  res_t exp_q [$];

  function automatic int lane_s(logic [M*Q-1:0] v, int i);
    return int'($signed(v[i*Q +: Q]));
  endfunction
  function automatic int lane_u(logic [M*Q-1:0] v, int i);
    return int'(v[i*Q +: Q]);
  endfunction
  function automatic int clamp7(int v);
    return v < 0 ? 0 : (v > 7 ? 7 : v);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    res_t r;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      r = exp_q.pop_front();
      if (int'(out_addr) != r.addr || int'(out_q) != r.q || out_is_raw != r.is_raw ||
          (r.is_raw && int'(out_raw) != r.raw)) begin
        failures++;
        $display("addr %0d/%0d q %0d/%0d raw %0d/%0d", out_addr, r.addr, out_q, r.q, out_raw, r.raw);
      end
    end
  end

  task automatic issue(ltype_e t, int fa, int wa, logic zero, logic first, logic last,
                       logic fire, logic pool, logic psub0, logic raw, int oa);
    @(negedge clk);
    iss = '0; iss.valid = 1; iss.ltype = t; iss.zero = zero; iss.first = first; iss.last = last;
    iss.dw_fire = fire; iss.pool = pool; iss.psub0 = psub0; iss.raw = raw;
    iss.out_addr = ADDR_W'(oa); iss.bn_addr = 0;
    f_ra = 8'(fa); w_raddr = 10'(wa);
  endtask

  int n_conv = 0;

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int l = 0; l < M; l++) begin
        fm[i][l*Q +: Q] = 3'($urandom_range(7));
        wm[i][l*Q +: Q] = 3'($urandom_range(7));
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // first-layer words 100..109: chunks of three pixels in lanes 0..8
    for (int i = 100; i < 110; i++) begin
      fm[i] = '0; wm[i] = '0;
      for (int c = 0; c < 3; c++) begin
        logic [8:0] px;
        logic [2:0] wv;
        px = 9'($urandom_range(255)); wv = 3'($urandom_range(7));
        for (int j = 0; j < 3; j++) begin
          fm[i][(3*c + j)*Q +: Q] = px[3*j +: 3];
          wm[i][(3*c + j)*Q +: Q] = wv;
        end
      end
    end
    // depthwise weights word 200: 9 weights, other lanes random (unused)
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wl_we = 1; wl_addr = 10'(i); wl_data = wm[i];
    end
    @(negedge clk); wl_we = 0; bl_we = 1; bl_addr = 0; bl_alpha = 0; bl_zeta = 16'(256);
    @(negedge clk); bl_we = 0;

    // ---- phase 1: CONV accumulations
    for (int o = 0; o < 20; o++) begin
      int t, s;
      res_t r;
      t = int'($urandom_range(5)) + 1; s = 0;
      for (int k = 0; k < t; k++) begin
        int fa, wa;
        logic z;
        fa = int'($urandom_range(99)); wa = int'($urandom_range(99)); z = ($urandom_range(4) == 0);
        if (!z) for (int l = 0; l < M; l++) s += lane_s(wm[wa], l) * lane_u(fm[fa], l);
        issue(L_CONV, fa, wa, z, k == 0, k == t - 1, 0, 0, 0, 1, o);
      end
      r.raw = s; r.q = clamp7(s); r.addr = o; r.is_raw = 1;
      exp_q.push_back(r);
      n_conv++;
    end
    // ---- phase 2: first layer
    for (int o = 0; o < 10; o++) begin
      int s;
      res_t r;
      s = 0;
      for (int k = 0; k < 2; k++) begin
        int i;
        i = 100 + (o + k) % 10;
        for (int c = 0; c < 3; c++) begin
          int px;
          px = lane_u(fm[i], 3*c) + 8 * lane_u(fm[i], 3*c + 1) + 64 * lane_u(fm[i], 3*c + 2);
          s += px * lane_s(wm[i], 3*c);
        end
        issue(L_FIRST, i, i, 0, k == 0, k == 1, 0, 0, 0, 1, 50 + o);
      end
      r.raw = s; r.q = clamp7(s); r.addr = 50 + o; r.is_raw = 1;
      exp_q.push_back(r);
    end
    // ---- phase 3: depthwise, a 3 x 8 strip from words 0..23 (row-major)
    for (int c = 0; c < 8; c++)
      for (int ky = 0; ky < 3; ky++) begin
        logic fire;
        fire = (ky == 2) && (c >= 2);
        issue(L_DW, ky * 8 + c, 200, 0, 1, 1, fire, 0, 1, 1, 80 + c);
        if (fire) begin
          int s;
          res_t r;
          s = 0;
          for (int yy = 0; yy < 3; yy++)
            for (int xx = 0; xx < 3; xx++)
              s += lane_u(fm[yy * 8 + c - 2 + xx], ID) * lane_s(wm[200], yy * 3 + xx);
          r.raw = s; r.q = clamp7(s); r.addr = 80 + c; r.is_raw = 1;
          exp_q.push_back(r);
        end
      end
    // ---- phase 4: max-pool of single-term CONV outputs
    for (int g = 0; g < 6; g++) begin
      int mx;
      res_t r;
      mx = 0;
      for (int sub = 0; sub < 4; sub++) begin
        int fa, wa, s;
        fa = int'($urandom_range(99)); wa = int'($urandom_range(99)); s = 0;
        for (int l = 0; l < M; l++) s += lane_s(wm[wa], l) * lane_u(fm[fa], l);
        if (clamp7(s) > mx) mx = clamp7(s);
        issue(L_CONV, fa, wa, 0, 1, 1, 0, 1, sub == 0, 0, 120 + g);
        @(negedge clk); iss = '0;
        @(negedge clk);
      end
      r.raw = 0; r.q = mx; r.addr = 120 + g; r.is_raw = 0;
      exp_q.push_back(r);
    end
    @(negedge clk); iss = '0;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
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
