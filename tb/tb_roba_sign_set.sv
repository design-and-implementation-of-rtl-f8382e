// Self-checking testbench of the RoBA sign set: the signed product must be
// the magnitude, negated when exactly one operand sign is set.
module tb_roba_sign_set;
  localparam int unsigned PW = 128;
  logic [PW-1:0] mag;
  logic sign_x, sign_y;
  logic signed [PW-1:0] p;
  int checks = 0, failures = 0;

  roba_sign_set #(.PW(PW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      logic signed [PW:0] e;
      mag    = {$urandom, $urandom, $urandom, $urandom} >> (1 + $urandom % 127);
      sign_x = $urandom % 2;
      sign_y = $urandom % 2;
      #1;
      e = (sign_x != sign_y) ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
      checks++;
      if (p !== e[PW-1:0]) begin
        failures++;
        $display("FAIL mag=%0d sx=%0b sy=%0b p=%0d", mag, sign_x, sign_y, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
