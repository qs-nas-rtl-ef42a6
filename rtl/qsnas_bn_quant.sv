// qsnas_bn_quant: batch normalization and quantizing ReLU of one PE output.
//
// Applies the two-parameter per-channel batch normalization
//   y = zeta * (x - alpha)
// to a finished accumulation x, with zeta a signed fixed-point factor of ZW
// bits and FRAC fraction bits (the product is shifted right arithmetically,
// i.e. rounded towards minus infinity).  The quantizing ReLU then clamps y
// to the q-bit unsigned range [0, 2^q - 1]; for q = 1 (binarized network)
// it outputs the sign bit, 1 for y >= 0.  The raw, saturated y is also
// given, for the classification layer, whose labels are not quantized.
// One register stage: outputs are valid one clock after in_valid.
// The two-parameter form is the accelerator's; the fixed-point format, the
// rounding and the saturation are this design's own choices.
module qsnas_bn_quant #(
  parameter int Q     = 3,   // output quantization
  parameter int ACC_W = 32,  // accumulator / raw output width
  parameter int ZW    = 16,  // width of the zeta factor
  parameter int FRAC  = 8    // fraction bits of zeta
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] x,
  input  logic signed [ACC_W-1:0] alpha,
  input  logic signed [ZW-1:0]    zeta,
  output logic                    out_valid,
  output logic [Q-1:0]            q_out,   // quantized activation
  output logic signed [ACC_W-1:0] raw_out  // y before the ReLU
);

  localparam int PROD_W = ACC_W + 1 + ZW;
  localparam logic signed [PROD_W-1:0] RAW_MAX = PROD_W'({1'b0, {(ACC_W-1){1'b1}}});
  localparam logic signed [PROD_W-1:0] RAW_MIN = -RAW_MAX - 1;
  localparam logic signed [PROD_W-1:0] Q_MAX   = PROD_W'((1 << Q) - 1);

  logic signed [ACC_W:0]    diff;
  logic signed [PROD_W-1:0] y;
  logic [Q-1:0]             qv;
  logic signed [ACC_W-1:0]  rv;

  always_comb begin
    diff = {x[ACC_W-1], x} - {alpha[ACC_W-1], alpha};
    y    = (PROD_W'(diff) * PROD_W'(zeta)) >>> FRAC;
    if (Q == 1)       qv = Q'(y >= 0);
    else if (y < 0)   qv = '0;
    else if (y > Q_MAX) qv = '1;
    else              qv = y[Q-1:0];
    if (y > RAW_MAX)      rv = RAW_MAX[ACC_W-1:0];
    else if (y < RAW_MIN) rv = RAW_MIN[ACC_W-1:0];
    else                  rv = y[ACC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q_out     <= '0;
      raw_out   <= '0;
    end else begin
      out_valid <= in_valid;
      q_out     <= qv;
      raw_out   <= rv;
    end
  end

endmodule
