// Multiplier-accumulator with a modified rounding-based approximate (RoBA)
// multiplier.
//
// Every cycle with in_valid, the product of two N-bit operands x and y,
// both signed (tc = 1) or both unsigned (tc = 0), is added to a 2N-bit
// accumulator. The product comes from one of two
// multipliers, chosen per operation:
//   approx = 0  exact: the SPST modified Booth encoder turns x and y into
//               N/2 + 2 partial product rows;
//   approx = 1  approximate: the modified RoBA multiplier computes one of
//               its four rounding-based terms (mode) as a single row.
// The rows go straight into the carry-save accumulator, which folds the
// accumulation into the partial product summation and keeps the running
// sum as sum and carry words. The carry-propagate addition is made only
// when rd asks for the result. This makes the MAC three steps (encode,
// compress-and-accumulate, final add on demand) instead of four.
//
// Block enabling: the multiplier that is not selected has its operands
// forced to zero, so it does not switch. The SPST status outputs tell when
// the Booth encoder's upper half, the RoBA adder/subtractor MSPs or the
// final adder's MSP were gated.
//
// Timing: one operation per cycle, no stall. clear = 1 with in_valid starts
// a new sum with this product. rd in cycle t returns the sum of all inputs
// up to cycle t-1 on result, with result_valid high in cycle t+1.
// Synchronous active-low reset. The accumulator wraps modulo 2^(2N).
// How the two multipliers share the accumulator, the select inputs and the
// handshake are this design's choices.
module roba_mac
  import roba_mac_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                clear,
  input  logic                tc,         // 1: signed operands, 0: unsigned
  input  logic                approx,     // 1: RoBA product, 0: exact Booth product
  input  roba_mode_e          mode,       // RoBA term when approx = 1
  input  logic [N-1:0]        x,
  input  logic [N-1:0]        y,
  input  logic                rd,
  output logic [2*N-1:0]      result,
  output logic                result_valid,
  output logic [2*N-1:0]      csa_sum,    // carry-save accumulator state
  output logic [2*N-1:0]      csa_carry,
  output logic                booth_upper_off,
  output logic [1:0]          roba_msp_off,
  output logic                final_msp_off
);
  localparam int unsigned PW = 2 * N;
  localparam int unsigned NG = N / 2 + 1;

  logic [N-1:0]         bx, by, rx, ry;
  logic [NG:0][PW-1:0]  booth_rows, rows;
  logic [PW-1:0]        roba_p;

  // block enabling: only the selected multiplier sees the operands
  always_comb begin
    bx = approx ? '0 : x;
    by = approx ? '0 : y;
    rx = approx ? x  : '0;
    ry = approx ? y  : '0;
  end

  booth_pp_gen #(.N(N), .NG(NG), .PW(PW)) u_booth (
    .x(bx), .y(by), .tc(tc), .rows(booth_rows), .upper_off(booth_upper_off)
  );

  roba_multiplier #(.N(N)) u_roba (
    .x(rx), .y(ry), .tc(tc), .mode(mode), .p(roba_p), .spst_msp_off(roba_msp_off)
  );

  always_comb begin
    if (approx) begin
      rows    = '0;
      rows[0] = roba_p;
    end else begin
      rows = booth_rows;
    end
  end

  csa_accumulator #(.W(PW), .K(NG + 1)) u_acc (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(clear),
    .rows(rows), .rd(rd),
    .sum_q(csa_sum), .carry_q(csa_carry),
    .result(result), .result_valid(result_valid),
    .final_msp_off(final_msp_off)
  );

endmodule
