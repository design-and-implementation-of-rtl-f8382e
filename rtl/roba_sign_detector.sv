// Sign detector of the RoBA multiplier.
//
// The rounding datapath works on unsigned magnitudes only, because a
// rounded negative number is not a power of two. For a two's complement
// operand (tc = 1) this block reads the MSB as the sign (0 positive,
// 1 negative) and returns the magnitude |a|; the magnitude is N bits wide,
// so the most negative value -2^(N-1) maps to 2^(N-1) without overflow.
// For an unsigned operand (tc = 0) the sign is 0 and the operand passes as
// its own magnitude, which lets one multiplier serve both number formats.
// Purely combinational.
module roba_sign_detector #(
  parameter int unsigned N = roba_mac_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,    // operand
  input  logic         tc,   // 1: a is two's complement, 0: unsigned
  output logic         sign, // 1 when a is negative
  output logic [N-1:0] mag   // |a|, unsigned
);
  always_comb begin
    sign = tc & a[N-1];
    mag  = sign ? (~a + 1'b1) : a;
  end
endmodule
