// Low-power adder/subtractor with spurious power suppression (SPST).
//
// The W-bit adder is cut into a least significant part (LSP, the low L
// bits) and a most significant part (MSP, the rest); the default 16-bit
// unit is split between bits 8 and 9 (8-bit LSP, 8-bit MSP). A detector
// checks whether the MSP of both operands is nothing but the sign extension
// of its LSP. If so, the MSP adder is not needed: AND gates force its inputs
// to zero so it does not toggle, and the MSP of the result is rebuilt as the
// sign extension of the LSP result. Otherwise the MSP adder adds the upper
// parts with the LSP carry. The result is exact in both cases (modulo 2^W).
//
// sub = 1 computes a - b (b inverted, carry-in 1), sub = 0 computes a + b.
// msp_off reports that the MSP was gated. Purely combinational.
//
// The split point, the operation and the zero-forcing AND gates follow the
// description of the unit; the sign-extension rule of the detector is this
// design's reading of when "the MSP is not required".
module spst_addsub #(
  parameter int unsigned W = 16,
  parameter int unsigned L = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,     // 1: a - b, 0: a + b
  output logic [W-1:0] y,
  output logic         msp_off  // MSP adder inputs were forced to zero
);
  localparam int unsigned M = W - L;

  logic [W-1:0] bx;          // b, inverted for subtraction
  logic [L-1:0] lsp_sum;
  logic         lsp_carry;
  logic [M-1:0] msp_a, msp_b, msp_sum;
  logic         ext_bit;

  always_comb begin
    bx = b ^ {W{sub}};
    {lsp_carry, lsp_sum} = {1'b0, a[L-1:0]} + {1'b0, bx[L-1:0]} + (L+1)'(sub);

    // detector: both MSPs are copies of their LSP sign bit
    msp_off = (a[W-1:L] == {M{a[L-1]}}) && (bx[W-1:L] == {M{bx[L-1]}});

    // AND-gate latches in front of the MSP adder
    msp_a   = a[W-1:L]  & {M{~msp_off}};
    msp_b   = bx[W-1:L] & {M{~msp_off}};
    msp_sum = msp_a + msp_b + M'(lsp_carry);

    // sign of the (L+1)-bit LSP result, which is the whole MSP when gated
    ext_bit = a[L-1] ^ bx[L-1] ^ lsp_carry;

    y = {msp_off ? {M{ext_bit}} : msp_sum, lsp_sum};
  end
endmodule
