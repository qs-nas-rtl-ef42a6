// qsnas_adder_tree: pipelined binary adder tree of a processing engine.
//
// Sums N signed inputs of IW bits in clog2(N) register stages; each stage
// halves the number of operands and widens them by one bit, as in the
// accelerator's adder tree whose input widths grow from stage to stage.
// The final sum is IW + clog2(N) bits wide and appears clog2(N) clocks
// after the inputs (one clock if N = 1).  A valid bit travels with the data.
// N need not be a power of two: missing operands are zero.
module qsnas_adder_tree #(
  parameter int N  = 32,   // number of inputs (M of the PE)
  parameter int IW = 12    // input width
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [N-1:0][IW-1:0]   in,
  output logic                          out_valid,
  output logic signed [IW+((N>1)?$clog2(N):0)-1:0] sum
);

  localparam int L  = (N > 1) ? $clog2(N) : 0;  // number of adder stages
  localparam int N2 = 1 << L;                     // padded operand count
  localparam int OW = IW + L;

  // Stage s holds N2 >> s operands of OW bits (upper bits sign extension).
  // st0 is the combinational input stage, st[1..L] are the registers.
  logic signed [OW-1:0] st0 [N2];
  logic signed [OW-1:0] st  [1:L+1][N2];
  logic                 vld [1:L+1];

  always_comb begin
    for (int i = 0; i < N2; i++)
      st0[i] = (i < N) ? OW'($signed(in[i])) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= L + 1; s++) begin
        vld[s] <= 1'b0;
        for (int i = 0; i < N2; i++) st[s][i] <= '0;
      end
    end else begin
      for (int s = 1; s <= L; s++) begin
        vld[s] <= (s == 1) ? in_valid : vld[s-1];
        for (int i = 0; i < N2; i++) begin
          if (i < (N2 >> s))
            st[s][i] <= (s == 1) ? st0[2*i] + st0[2*i+1]
                                 : st[s-1][2*i] + st[s-1][2*i+1];
          else
            st[s][i] <= '0;
        end
      end
    end
  end

  if (L == 0) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        sum       <= '0;
      end else begin
        out_valid <= in_valid;
        sum       <= st0[0];
      end
    end
  end else begin : g_tree
    assign out_valid = vld[L];
    assign sum       = st[L][0];
  end

endmodule
