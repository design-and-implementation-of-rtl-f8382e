// Modified Booth encoder and partial product generator with SPST detector.
//
// The multiplier Y is recoded in overlapping 3-bit groups
// (y[2i+1], y[2i], y[2i-1], with y[-1] = 0) into digits
// d_i = -2*y[2i+1] + y[2i] + y[2i-1] in {-2, -1, 0, +1, +2}, so that
// Y = sum d_i * 4^i. Each digit selects a partial product 0, X or 2X and
// whether to negate it. A negated row is formed by inverting the selected
// value; the +1 that completes the two's complement of every negated row is
// collected in one extra row (bit 2i set for digit i), so no row needs its
// own adder. Rows are sign-extended to PW = 2N bits and shifted by 2i; the
// sum of all rows modulo 2^PW equals X*Y.
//
// Signed and unsigned operands share the unit: tc = 1 reads X and Y as two's
// complement, tc = 0 as unsigned. Both operands are extended by one bit
// (sign or zero) and Y gets one more digit, NG = N/2 + 1 in all; for signed
// operands that last digit is always 0.
//
// Spurious power suppression: a detector looks at the upper half of Y. When
// y[N-1:N/2-1] is all copies of the sign (all zeros for unsigned Y), every
// digit from N/4 upwards is zero, so those encoders are disabled (their
// inputs forced to zero) and their rows stay zero instead of toggling.
// upper_off reports this.
//
// Purely combinational. N must be a multiple of 4. The radix-4 recoding
// follows the equations of the design; the correction row, the detector
// granularity, the zero forcing and the operand extension are this
// design's choices.
module booth_pp_gen #(
  parameter int unsigned N  = roba_mac_pkg::DEFAULT_N,
  parameter int unsigned NG = N / 2 + 1,   // number of Booth digits
  parameter int unsigned PW = 2 * N
) (
  input  logic [N-1:0]         x,          // multiplicand
  input  logic [N-1:0]         y,          // multiplier (recoded)
  input  logic                 tc,         // 1: signed operands, 0: unsigned
  output logic [NG:0][PW-1:0]  rows,       // NG partial products + correction row
  output logic                 upper_off   // upper encoders disabled
);
  logic [N+2:0] yg;      // y extended to N+2 bits, with y[-1] = 0 appended
  logic [N:0]   xe;      // x extended by one bit
  logic         sy;
  logic [NG-1:0] one, two, neg;

  initial assert (N % 4 == 0 && NG == N / 2 + 1)
    else $error("booth_pp_gen: N must be a multiple of 4 and NG = N/2 + 1");

  always_comb begin
    sy = tc & y[N-1];
    xe = {tc & x[N-1], x};
    yg = {sy, sy, y, 1'b0};
    upper_off = (y[N-1:N/2-1] == {(N/2+1){tc & y[N/2-1]}});

    rows = '0;
    for (int unsigned i = 0; i < NG; i++) begin
      logic [2:0]   grp;
      logic [N+1:0] base;
      grp    = yg[2*i +: 3];
      if (upper_off && i >= N / 4) grp = '0;   // disabled encoder: digit 0
      one[i] = grp[1] ^ grp[0];
      two[i] = (grp == 3'b100) || (grp == 3'b011);
      neg[i] = grp[2] & ~(grp[1] & grp[0]);
      if (two[i])      base = {xe, 1'b0};
      else if (one[i]) base = {xe[N], xe};
      else             base = '0;
      if (neg[i]) base = ~base;
      rows[i] = PW'({{(PW-N-2){base[N+1]}}, base} << (2 * i));
      rows[NG][2*i] = neg[i];
    end
  end
endmodule
