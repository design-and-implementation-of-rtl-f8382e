// Self-checking testbench of the rounding block: 2^exp_k must be the nearest
// power of two of the magnitude (ties rounded up), found by the reference
// through distance comparison. Covers every power of two, its neighbours,
// the tie points 3*2^p and random magnitudes of all widths.
module tb_roba_rounder;
  import roba_ref_pkg::*;
  localparam int unsigned N  = 64;
  localparam int unsigned KW = $clog2(N + 1);
  logic [N-1:0]  mag;
  logic [KW-1:0] exp_k;
  logic          zero;
  int checks = 0, failures = 0;

  roba_rounder #(.N(N)) dut (.mag(mag), .exp_k(exp_k), .zero(zero));

  task automatic check(logic [N-1:0] m);
    logic [65:0] got, exp;
    mag = m;
    #1;
    got = zero ? '0 : (66'd1 << exp_k);
    exp = nearest_pow2(65'(m));
    checks++;
    if (got !== exp || zero !== (m == 0)) begin
      failures++;
      $display("FAIL mag=%0d exp_k=%0d zero=%0b expected %0d", m, exp_k, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 64; p++) begin
      check(64'd1 << p);
      check((64'd1 << p) + 64'd1);
      check((64'd1 << p) - 64'd1);
      if (p < 63) begin
        check(64'd3 << p);
        check((64'd3 << p) - 64'd1);
      end
    end
    check('0);
    check('1);
    repeat (2000) check(64'(rand_operand(64)) & 64'h7fff_ffff_ffff_ffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
