// Self-checking testbench of the RoBA sign detector: random and corner
// operands, read as signed and as unsigned, magnitude and sign compared
// with the reference arithmetic.
module tb_roba_sign_detector;
  import roba_ref_pkg::*;
  localparam int unsigned N = 64;
  logic [N-1:0] a;
  logic tc, sign;
  logic [N-1:0] mag;
  int checks = 0, failures = 0;

  roba_sign_detector #(.N(N)) dut (.a(a), .tc(tc), .sign(sign), .mag(mag));

  task automatic check(longint v);
    for (int t = 0; t < 2; t++) begin
      a = v;
      tc = t[0];
      #1;
      checks++;
      if (sign !== (tc && v < 0) || 65'(mag) !== magnitude(v, tc)) begin
        failures++;
        $display("FAIL a=%0d tc=%0b sign=%0b mag=%0d", v, tc, sign, mag);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1);
    check(64'h7fff_ffff_ffff_ffff);
    check(64'sh8000_0000_0000_0000);
    repeat (2000) check(rand_operand(64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
