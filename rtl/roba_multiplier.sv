// Modified rounding-based approximate (RoBA) multiplier.
//
// X*Y = (Xr-X)(Yr-Y) + Xr*Y + X*Yr - Xr*Yr, where Xr and Yr are X and Y
// rounded to the nearest power of two. Dropping the first term leaves only
// shifts, one addition and one subtraction. The modified multiplier offers
// four terms of rising accuracy and cost, chosen by `mode`:
//   ROBA_XR_YR  Xr*Yr                    (one shift)
//   ROBA_XR_Y   Xr*Y                     (one shift)
//   ROBA_AVG    (Xr*Y + X*Yr) / 2        (two shifts, adder)
//   ROBA_FULL   Xr*Y + X*Yr - Xr*Yr      (basic RoBA: adder and subtractor)
// The datapath is the chain of the basic RoBA unit: sign detector ->
// rounding block -> shifter -> adder -> subtractor -> sign set, all on
// magnitudes, with the sign put back at the end. Adder and subtractor are
// SPST units; operands of the adder or subtractor are forced to zero in the
// modes that do not use them, so they do not toggle. The halving of ROBA_AVG
// truncates the magnitude (rounds toward zero), a choice of this design, as
// are the mode encoding and the tie rule of the rounding block.
//
// tc selects the number format: 1 for two's complement operands, 0 for
// unsigned ones (the sign detector then passes the operands through and p
// is an unsigned product). The adder and subtractor are one bit wider than
// the product so Xr*Y + X*Yr cannot overflow for unsigned operands. The one
// unsigned term that can exceed 2N bits is Xr*Yr = 2^(2N), when both
// operands round up to 2^N; it saturates to 2^(2N) - 1, a choice of this
// design.
//
// Purely combinational: p is valid in the same cycle as x, y and mode.
// p is the 2N-bit product, and every mode's result fits in it, signed or
// unsigned. spst_msp_off tells which SPST unit ran with its upper half
// gated. In ROBA_FULL the subtraction is done modulo 2^(2N+1) and the low
// 2N bits are kept, so a wrapped Xr*Yr still gives the right result.
module roba_multiplier
  import roba_mac_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic [N-1:0]          x,
  input  logic [N-1:0]          y,
  input  logic                  tc,    // 1: signed operands, 0: unsigned
  input  roba_mode_e            mode,
  output logic [2*N-1:0]        p,
  output logic [1:0]            spst_msp_off  // [0] adder, [1] subtractor MSP gated
);
  localparam int unsigned PW = 2 * N;
  localparam int unsigned KW = $clog2(N + 1);

  logic          sx, sy;
  logic [N-1:0]  mx, my;
  logic [KW-1:0] kx, ky;
  logic          zx, zy;
  logic [PW-1:0] xr_y, x_yr, xr_yr;
  logic [PW:0]   add_a, add_b, sum;   // one guard bit
  logic [PW:0]   sub_a, sub_b, diff;
  logic          rr_ovf;             // Xr*Yr = 2^(2N) does not fit
  logic [PW-1:0] mag;

  roba_sign_detector #(.N(N)) u_sign_x (.a(x), .tc(tc), .sign(sx), .mag(mx));
  roba_sign_detector #(.N(N)) u_sign_y (.a(y), .tc(tc), .sign(sy), .mag(my));

  roba_rounder #(.N(N), .KW(KW)) u_round_x (.mag(mx), .exp_k(kx), .zero(zx));
  roba_rounder #(.N(N), .KW(KW)) u_round_y (.mag(my), .exp_k(ky), .zero(zy));

  roba_shifter #(.N(N), .KW(KW), .PW(PW)) u_shift (
    .x_mag(mx), .y_mag(my), .kx(kx), .x_zero(zx), .ky(ky), .y_zero(zy),
    .xr_y(xr_y), .x_yr(x_yr), .xr_yr(xr_yr)
  );

  // adder: Xr*Y + X*Yr, needed by ROBA_AVG and ROBA_FULL
  always_comb begin
    logic use_add;
    use_add = (mode == ROBA_AVG) || (mode == ROBA_FULL);
    add_a   = {1'b0, xr_y} & {(PW+1){use_add}};
    add_b   = {1'b0, x_yr} & {(PW+1){use_add}};
  end

  spst_addsub #(.W(PW + 1), .L(PW / 2)) u_adder (
    .a(add_a), .b(add_b), .sub(1'b0), .y(sum), .msp_off(spst_msp_off[0])
  );

  // subtractor: (Xr*Y + X*Yr) - Xr*Yr, needed by ROBA_FULL only
  always_comb begin
    logic use_sub;
    use_sub = (mode == ROBA_FULL);
    sub_a   = sum            & {(PW+1){use_sub}};
    sub_b   = {1'b0, xr_yr}  & {(PW+1){use_sub}};
  end

  spst_addsub #(.W(PW + 1), .L(PW / 2)) u_subtractor (
    .a(sub_a), .b(sub_b), .sub(1'b1), .y(diff), .msp_off(spst_msp_off[1])
  );

  // only reachable with unsigned operands that both round up to 2^N
  always_comb rr_ovf = !zx && !zy && (({1'b0, kx} + {1'b0, ky}) == (KW + 1)'(PW));

  always_comb begin
    unique case (mode)
      ROBA_XR_YR: mag = rr_ovf ? '1 : xr_yr;
      ROBA_XR_Y:  mag = xr_y;
      ROBA_AVG:   mag = sum[PW:1];
      default:    mag = diff[PW-1:0];   // the true value fits in 2N bits
    endcase
  end

  roba_sign_set #(.PW(PW)) u_sign_set (.mag(mag), .sign_x(sx), .sign_y(sy), .p(p));

endmodule
