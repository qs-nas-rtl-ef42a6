// qsnas_mul_lane: one multiplier of a processing engine.
//
// For q >= 2 it multiplies a signed q-bit weight by an unsigned q-bit
// activation (the output of a quantizing ReLU).  For q = 1 the network is
// binarized: bit values 0/1 stand for -1/+1 and the multiplier is an XNOR
// whose result is +1 or -1.
//
// First layer: the 8-bit input pixel is split into q-bit chunks held in
// neighbouring lanes, and every lane holding a chunk of one pixel receives a
// copy of that pixel's weight.  The lane's product is then shifted left by
// q times the chunk position (SH), so that the adder tree sums the shifted
// partial products into the full 8-bit x q-bit product.  For q = 1 the chunk
// is a plain pixel bit (0/1) and the weight is +1/-1.
//
// Purely combinational; the PE registers the result.  The chunk scheme is
// the accelerator's; the operand encodings follow the usual conventions for
// quantized and binarized networks.
module qsnas_mul_lane #(
  parameter int Q  = 3,    // quantization level of weights and activations
  parameter int SH = 0,    // first-layer shift of this lane (q * chunk)
  parameter int PW = 12    // product width handed to the adder tree
) (
  input  logic [Q-1:0]         w,      // weight
  input  logic [Q-1:0]         a,      // activation or pixel chunk
  input  logic                 first,  // first-layer mode
  output logic signed [PW-1:0] p       // product, sign-extended, shifted
);

  logic signed [PW-1:0] prod;

  if (Q == 1) begin : g_bin
    always_comb begin
      if (first)
        prod = a[0] ? (w[0] ? PW'(1) : -PW'(1)) : '0;
      else
        prod = (w[0] ~^ a[0]) ? PW'(1) : -PW'(1);
    end
  end else begin : g_mul
    logic signed [2*Q:0] full;
    always_comb begin
      full = $signed(w) * $signed({1'b0, a});
      prod = PW'(full);
    end
  end

  assign p = first ? (prod <<< SH) : prod;

endmodule
