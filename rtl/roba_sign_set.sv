// Sign set of the RoBA multiplier.
//
// Gives the unsigned approximate product the sign of the exact product,
// the XOR of the two operand signs, by two's complement negation.
// Purely combinational.
module roba_sign_set #(
  parameter int unsigned PW = 2 * roba_mac_pkg::DEFAULT_N
) (
  input  logic [PW-1:0]        mag,    // unsigned product magnitude
  input  logic                 sign_x,
  input  logic                 sign_y,
  output logic signed [PW-1:0] p       // signed product
);
  always_comb p = (sign_x ^ sign_y) ? (~mag + 1'b1) : mag;
endmodule
