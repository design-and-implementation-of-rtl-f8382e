// Shifter of the RoBA multiplier.
//
// Since Xr = 2^kx and Yr = 2^ky, the three products the RoBA formula needs
// are plain left shifts: Xr*Y = |Y| << kx, X*Yr = |X| << ky and
// Xr*Yr = 1 << (kx + ky). An operand that is zero rounds to Xr = 0, which
// zeroes the products it takes part in. Outputs are PW bits wide, unsigned,
// and wrap modulo 2^PW. Purely combinational.
module roba_shifter #(
  parameter int unsigned N  = roba_mac_pkg::DEFAULT_N,
  parameter int unsigned KW = $clog2(N + 1),
  parameter int unsigned PW = 2 * N
) (
  input  logic [N-1:0]  x_mag, // |X|
  input  logic [N-1:0]  y_mag, // |Y|
  input  logic [KW-1:0] kx,    // Xr = 2^kx
  input  logic          x_zero,
  input  logic [KW-1:0] ky,    // Yr = 2^ky
  input  logic          y_zero,
  output logic [PW-1:0] xr_y,  // Xr*|Y|
  output logic [PW-1:0] x_yr,  // |X|*Yr
  output logic [PW-1:0] xr_yr  // Xr*Yr
);
  always_comb begin
    xr_y  = x_zero ? '0 : (PW'(y_mag) << kx);
    x_yr  = y_zero ? '0 : (PW'(x_mag) << ky);
    xr_yr = (x_zero || y_zero) ? '0 : (PW'(1) << ({1'b0, kx} + {1'b0, ky}));
  end
endmodule
