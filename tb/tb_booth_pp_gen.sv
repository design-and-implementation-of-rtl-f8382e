// Self-checking testbench of the SPST modified Booth encoder at N = 64,
// for signed and unsigned operands: the sum of all partial product rows
// modulo 2^128 must equal X*Y, each row must be a Booth digit in {-2..2}
// times X placed at 4^i (checked on the row plus its correction bit), and
// upper_off must flag exactly the multipliers whose bits from N/2-1 up are
// sign (or, unsigned, zero) extension. Both cases of the detector must
// occur.
module tb_booth_pp_gen;
  import roba_ref_pkg::*;
  localparam int unsigned N = 64, NG = N / 2 + 1, PW = 2 * N;
  logic [N-1:0] x, y;
  logic tc;
  logic [NG:0][PW-1:0] rows;
  logic upper_off;
  int checks = 0, failures = 0, n_off = 0, n_on = 0;

  booth_pp_gen #(.N(N)) dut (.x(x), .y(y), .tc(tc), .rows(rows), .upper_off(upper_off));

  task automatic check(longint xv, longint yv, bit t);
    logic [PW-1:0] acc, prod;
    logic [N+1:0]  ye;
    bit exp_off;
    x = xv;
    y = yv;
    tc = t;
    #1;
    acc = '0;
    for (int i = 0; i <= NG; i++) acc += rows[i];
    prod = PW'(exact_product(xv, yv, t));
    if (t) exp_off = (yv >= -(longint'(1) << 31)) && (yv < (longint'(1) << 31));
    else   exp_off = 64'(yv) < (64'd1 << 31);
    ye = t ? {{2{y[N-1]}}, y} : {2'b00, y};
    checks++;
    if (acc !== prod || upper_off !== exp_off) begin
      failures++;
      $display("FAIL x=%0d y=%0d sum=%h exp=%h upper_off=%0b", xv, yv, acc, prod, upper_off);
    end
    // each row (with its +1) is d*X*4^i for a digit d read off y directly
    for (int i = 0; i < NG; i++) begin
      int d;
      logic [PW-1:0] r, e;
      d = -2 * int'(ye[2*i+1]) + int'(ye[2*i]) + ((i == 0) ? 0 : int'(ye[2*i-1]));
      r = rows[i] + (PW'(rows[NG][2*i]) << (2 * i));
      e = PW'(wide_t'(d) * exact_product(xv, 1, t)) << (2 * i);
      checks++;
      if (r !== e) begin
        failures++;
        $display("FAIL row %0d x=%0d y=%0d digit %0d", i, xv, yv, d);
      end
    end
    if (upper_off) n_off++; else n_on++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++) begin
      check(0, 0, t[0]);
      check(64'sh8000_0000_0000_0000, 64'sh8000_0000_0000_0000, t[0]);
      check(64'h7fff_ffff_ffff_ffff, 64'sh8000_0000_0000_0000, t[0]);
      check(-1, -1, t[0]);
      check(12345, -(longint'(1) << 31), t[0]);
      check(12345, (longint'(1) << 31), t[0]);
      check(-5, (longint'(1) << 31) - 1, t[0]);
      repeat (3000) check(rand_operand(64), rand_operand(64), t[0]);
    end
    if (n_off == 0 || n_on == 0) begin
      failures++;
      $display("FAIL: detector off %0d, on %0d", n_off, n_on);
    end
    $display("upper half disabled %0d times, enabled %0d times", n_off, n_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
