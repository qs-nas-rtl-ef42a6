// qsnas_pe: one processing engine (PE) of the QS-NAS accelerator.
//
// A PE computes one output channel at a time.  It owns a weight sub-bank
// (M*q bits wide) that holds its share of the filters, M q-bit multipliers,
// a pipelined adder tree, an accumulator, the batch-norm / quantizing-ReLU
// stage, a 2x2 max-pool unit and, for depthwise layers, a KxK patch buffer.
// All P PEs receive the same fmap word and the same weight address each
// clock and work in lock step.
//
//  * Vanilla CONV/FC: the fmap word (M channels of one pixel) and the weight
//    word (the same M channels of this PE's filter) are multiplied lane by
//    lane and summed; the accumulator adds one such dot product per clock
//    over all kernel positions and channel groups of the output.
//  * First layer: the word holds q-bit chunks of the RGB pixel and the
//    weight word copies of the q-bit weights; each lane shifts its product
//    by q times its chunk index, so one clock does C 8-bit x q-bit MACs.
//  * Depthwise: the PE takes lane PE_ID of each fmap word (its channel)
//    into the KxK patch buffer; when a patch is complete (every K clocks)
//    the K*K values are multiplied with the K*K weights of one weight word.
//  * Global average pool: lane PE_ID of each fmap word goes straight into
//    the adder tree (the multipliers are bypassed) and the accumulator sums
//    it over all pixels; the 1/(H*W) scale is part of the batch-norm zeta.
//
// Timing: the tag `iss` and `w_raddr` are given in the clock the fmap read
// is issued; `fdata` follows one clock later (block-RAM latency).  A result
// leaves clog2(M) + 6 clocks after the tag of its last term (plus 4 when it
// goes through the max-pool).  The organisation (sub-bank, multipliers,
// adder tree plus accumulator, one channel per PE, patch buffer, chunked
// first layer, bubble-sort pool) follows the accelerator; the pipeline
// registers, the tag and the batch-norm parameter store (a small LUT-RAM
// of BN_DEPTH entries) are this design's own choices.
module qsnas_pe
  import qsnas_pkg::*;
#(
  parameter int Q        = 3,
  parameter int M        = 32,
  parameter int WDEPTH   = 1024,
  parameter int BN_DEPTH = 64,
  parameter int ACC_W    = 32,
  parameter int ZW       = 16,
  parameter int FRAC     = 8,
  parameter int KDW      = 3,    // depthwise kernel size
  parameter int PE_ID    = 0     // channel lane this PE takes in DW layers
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // weight sub-bank load
  input  logic                      wl_we,
  input  logic [$clog2(WDEPTH)-1:0] wl_addr,
  input  logic [M*Q-1:0]            wl_data,
  // batch-norm parameter load
  input  logic                      bl_we,
  input  logic [BNA_W-1:0]          bl_addr,
  input  logic signed [ACC_W-1:0]   bl_alpha,
  input  logic signed [ZW-1:0]      bl_zeta,
  // issue (clock of the fmap read)
  input  issue_t                    iss,
  input  logic [$clog2(WDEPTH)-1:0] w_raddr,
  // fmap word, one clock after the issue
  input  logic [M*Q-1:0]            fdata,
  // result
  output logic                      out_valid,
  output logic [Q-1:0]              out_q,
  output logic signed [ACC_W-1:0]   out_raw,
  output logic                      out_is_raw,
  output logic [ADDR_W-1:0]         out_addr
);

  localparam int NCH = nchunk(Q);
  localparam int PW  = 2*Q + Q*(NCH - 1);          // shifted product width
  localparam int L   = (M > 1) ? $clog2(M) : 0;
  localparam int TL  = (L > 0) ? L : 1;            // adder tree latency
  localparam int SW  = PW + L;                      // tree sum width

  initial assert (KDW * KDW <= M && PE_ID < M)
    else $error("PE: M=%0d too small for the depthwise patch or PE_ID", M);

  // ---------------------------------------------------------------- S0
  issue_t         m0;
  logic [M*Q-1:0] wdata;

  qsnas_sram #(.WIDTH(M*Q), .DEPTH(WDEPTH)) u_wmem (
    .clk   (clk),
    .we    (wl_we),
    .waddr (wl_addr),
    .wdata (wl_data),
    .raddr (w_raddr),
    .rdata (wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m0 <= '0;
    else        m0 <= iss;
  end

  logic [KDW*KDW-1:0][Q-1:0] patch;

  qsnas_dw_window #(.Q(Q), .K(KDW)) u_win (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (m0.valid && m0.ltype == L_DW),
    .din   (m0.zero ? '0 : fdata[PE_ID*Q +: Q]),
    .patch (patch)
  );

  // ---------------------------------------------------------------- S1
  issue_t         m1;
  logic [M*Q-1:0] e1, w1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0;
      e1 <= '0;
      w1 <= '0;
    end else begin
      m1       <= m0;
      m1.valid <= m0.valid && (m0.ltype != L_DW || m0.dw_fire);
      e1       <= m0.zero ? '0 : fdata;
      w1       <= wdata;
    end
  end

  logic [M-1:0][Q-1:0]    act;
  logic signed [M-1:0][PW-1:0] prod, mprod;

  always_comb begin
    for (int i = 0; i < M; i++) begin
      if (m1.ltype == L_DW) act[i] = (i < KDW*KDW) ? patch[i] : '0;
      else                  act[i] = e1[i*Q +: Q];
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_lane
    qsnas_mul_lane #(.Q(Q), .SH(Q * (i % NCH)), .PW(PW)) u_mul (
      .w     (w1[i*Q +: Q]),
      .a     (act[i]),
      .first (m1.ltype == L_FIRST),
      .p     (mprod[i])
    );
  end

  // average pool: this PE's channel value alone, unmultiplied
  always_comb begin
    prod = mprod;
    if (m1.ltype == L_AVG) begin
      prod    = '0;
      prod[0] = PW'($signed({1'b0, e1[PE_ID*Q +: Q]}));
    end
  end

  // ---------------------------------------------------------------- S2
  issue_t                      m2;
  logic signed [M-1:0][PW-1:0] p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m2 <= '0;
      p2 <= '0;
    end else begin
      m2 <= m1;
      p2 <= prod;
    end
  end

  // ---------------------------------------------------------- adder tree
  logic                 t_valid;
  logic signed [SW-1:0] t_sum;
  issue_t               mt [TL];

  qsnas_adder_tree #(.N(M), .IW(PW)) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (m2.valid),
    .in        (p2),
    .out_valid (t_valid),
    .sum       (t_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TL; i++) mt[i] <= '0;
    end else begin
      mt[0] <= m2;
      for (int i = 1; i < TL; i++) mt[i] <= mt[i-1];
    end
  end

  // --------------------------------------------------------- accumulator
  logic signed [ACC_W-1:0] acc, acc_next;
  logic                    r_valid;
  logic signed [ACC_W-1:0] r_val;
  issue_t                  r_tag;

  assign acc_next = (mt[TL-1].first ? '0 : acc) + ACC_W'(t_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      r_valid <= 1'b0;
      r_val   <= '0;
      r_tag   <= '0;
    end else begin
      r_valid <= 1'b0;
      if (t_valid) begin
        acc <= acc_next;
        if (mt[TL-1].last) begin
          r_valid <= 1'b1;
          r_val   <= acc_next;
          r_tag   <= mt[TL-1];
        end
      end
    end
  end

  // ------------------------------------------------ batch norm and ReLU
  logic signed [ACC_W-1:0] bn_alpha [BN_DEPTH];
  logic signed [ZW-1:0]    bn_zeta  [BN_DEPTH];

  always_ff @(posedge clk) begin
    if (bl_we) begin
      bn_alpha[bl_addr[$clog2(BN_DEPTH)-1:0]] <= bl_alpha;
      bn_zeta [bl_addr[$clog2(BN_DEPTH)-1:0]] <= bl_zeta;
    end
  end

  logic                    b_valid;
  logic [Q-1:0]            b_q;
  logic signed [ACC_W-1:0] b_raw;
  issue_t                  b_tag;

  qsnas_bn_quant #(.Q(Q), .ACC_W(ACC_W), .ZW(ZW), .FRAC(FRAC)) u_bn (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (r_valid),
    .x         (r_val),
    .alpha     (bn_alpha[r_tag.bn_addr[$clog2(BN_DEPTH)-1:0]]),
    .zeta      (bn_zeta [r_tag.bn_addr[$clog2(BN_DEPTH)-1:0]]),
    .out_valid (b_valid),
    .q_out     (b_q),
    .raw_out   (b_raw)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_tag <= '0;
    else        b_tag <= r_tag;
  end

  // ------------------------------------------------------------ max-pool
  logic              p_valid;
  logic [Q-1:0]      p_val;
  logic [ADDR_W-1:0] p_addr;

  qsnas_maxpool #(.Q(Q), .TAG_W(ADDR_W)) u_pool (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (b_valid && b_tag.pool),
    .in_first  (b_tag.psub0),
    .in_val    (b_q),
    .in_tag    (b_tag.out_addr),
    .out_valid (p_valid),
    .out_val   (p_val),
    .out_tag   (p_addr)
  );

  // ------------------------------------------------------------- output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_q      <= '0;
      out_raw    <= '0;
      out_is_raw <= 1'b0;
      out_addr   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (p_valid) begin
        out_valid  <= 1'b1;
        out_q      <= p_val;
        out_is_raw <= 1'b0;
        out_addr   <= p_addr;
      end else if (b_valid && !b_tag.pool) begin
        out_valid  <= 1'b1;
        out_q      <= b_q;
        out_raw    <= b_raw;
        out_is_raw <= b_tag.raw;
        out_addr   <= b_tag.out_addr;
      end
    end
  end

endmodule
