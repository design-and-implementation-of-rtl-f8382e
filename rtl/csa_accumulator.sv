// Carry-save multiply-accumulate core with on-demand final addition.
//
// A conventional MAC adds the partial products into a product, resolves it
// with a carry-propagate adder and only then accumulates it. Here the
// accumulator itself is kept in carry-save form, a sum word S and a carry
// word C, and is fed back into the partial product summation: each input
// cycle the K partial product rows plus S and C are compressed by an array
// of 3:2 carry-save adders into a new S and C. No carry ever propagates
// during accumulation; the final carry-propagate addition S + C is made
// only when the result is asked for (rd), through an SPST adder whose
// inputs are forced to zero while no result is requested.
//
// Timing: one accumulation per cycle. in_valid with clear = 1 starts a new
// sum (S, C <- rows only); in_valid with clear = 0 adds the rows to the
// running sum. rd in cycle t makes result = S + C as held at the start of
// cycle t, i.e. including every input up to cycle t-1, with result_valid
// high in cycle t+1. Synchronous active-low reset clears S, C and the
// result. The sum wraps modulo 2^W.
module csa_accumulator #(
  parameter int unsigned W = 2 * roba_mac_pkg::DEFAULT_N,  // accumulator width
  parameter int unsigned K = roba_mac_pkg::DEFAULT_N / 2 + 2 // rows per input
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                clear,          // start a new accumulation
  input  logic [K-1:0][W-1:0] rows,           // partial product rows
  input  logic                rd,             // request the resolved result
  output logic [W-1:0]        sum_q,          // carry-save state: sum word
  output logic [W-1:0]        carry_q,        // carry-save state: carry word
  output logic [W-1:0]        result,
  output logic                result_valid,
  output logic                final_msp_off   // final adder ran with MSP gated
);
  logic [W-1:0] s_next, c_next;
  logic [W-1:0] fa_a, fa_b, fa_y;

  // 3:2 compression array: feedback S and C enter first, then each row
  always_comb begin
    logic [W-1:0] s, c;
    s = clear ? '0 : sum_q;
    c = clear ? '0 : carry_q;
    for (int unsigned k = 0; k < K; k++) begin
      logic [W-1:0] r, s_n;
      r   = rows[k];
      s_n = s ^ c ^ r;
      c   = ((s & c) | (s & r) | (c & r)) << 1;
      s   = s_n;
    end
    s_next = s;
    c_next = c;
  end

  // final addition, operands gated while no result is requested
  always_comb begin
    fa_a = sum_q   & {W{rd}};
    fa_b = carry_q & {W{rd}};
  end

  spst_addsub #(.W(W), .L(W / 2)) u_final_adder (
    .a(fa_a), .b(fa_b), .sub(1'b0), .y(fa_y), .msp_off(final_msp_off)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q        <= '0;
      carry_q      <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        sum_q   <= s_next;
        carry_q <= c_next;
      end
      result_valid <= rd;
      if (rd) result <= fa_y;
    end
  end
endmodule
