// Rounding block of the RoBA multiplier.
//
// Rounds an unsigned magnitude m to the nearest power of two Xr = 2^k. With
// the leading one of m at position p, m lies between 2^p and 2^(p+1); the
// midpoint is 2^p + 2^(p-1), so bit p-1 alone decides: 0 keeps 2^p, 1 rounds
// up to 2^(p+1). The tie 3*2^(p-1) is rounded up, a choice of this design.
// The result is returned as the exponent k plus a flag for m = 0, so the
// shifter can use it directly. Purely combinational.
//
// k reaches N for unsigned magnitudes of at least 3*2^(N-2); magnitudes of
// signed operands are at most 2^(N-1), so for them k stays below N.
module roba_rounder #(
  parameter int unsigned N  = roba_mac_pkg::DEFAULT_N,
  parameter int unsigned KW = $clog2(N + 1)
) (
  input  logic [N-1:0]  mag,   // unsigned magnitude
  output logic [KW-1:0] exp_k, // Xr = 2^exp_k (0 when zero = 1)
  output logic          zero   // mag == 0, so Xr = 0
);
  always_comb begin
    exp_k = '0;
    zero  = (mag == '0);
    // scan from LSB upwards: the last set bit seen is the leading one
    for (int unsigned p = 0; p < N; p++) begin
      if (mag[p]) begin
        if (p > 0 && mag[p-1]) exp_k = KW'(p + 1);
        else                   exp_k = KW'(p);
      end
    end
  end
endmodule
