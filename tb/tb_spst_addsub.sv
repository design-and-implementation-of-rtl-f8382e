// Self-checking testbench of the 16-bit SPST adder/subtractor: every
// result is compared with a + b or a - b modulo 2^16, and msp_off with the
// condition that both MSPs are sign extension (operands in signed 8-bit
// range). Counts how often the MSP was gated and how often it ran; both
// must happen.
module tb_spst_addsub;
  localparam int unsigned W = 16, L = 8;
  logic [W-1:0] a, b, y;
  logic sub, msp_off;
  int checks = 0, failures = 0, n_gated = 0, n_active = 0;

  spst_addsub dut (.a(a), .b(b), .sub(sub), .y(y), .msp_off(msp_off));

  function automatic bit in_lsp_range(logic [W-1:0] v);
    return $signed(v) >= -128 && $signed(v) <= 127;
  endfunction

  task automatic check();
    logic [W-1:0] e;
    bit gate;
    #1;
    e = sub ? a - b : a + b;
    gate = in_lsp_range(a) && in_lsp_range(sub ? ~b : b);
    checks++;
    if (y !== e || msp_off !== gate) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0b y=%h exp=%h msp_off=%0b", a, b, sub, y, e, msp_off);
    end
    if (msp_off) n_gated++; else n_active++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) begin
      // half the operands small (signed 8-bit), half full width
      a   = ($urandom % 2) ? W'($signed(8'($urandom))) : W'($urandom);
      b   = ($urandom % 2) ? W'($signed(8'($urandom))) : W'($urandom);
      sub = $urandom % 2;
      check();
    end
    // corner cases around the split
    a = 16'h007f; b = 16'h0001; sub = 0; check();
    a = 16'hff80; b = 16'h0001; sub = 1; check();
    a = 16'h007f; b = 16'h007f; sub = 0; check();
    a = 16'hff80; b = 16'h0080; sub = 0; check();
    if (n_gated == 0 || n_active == 0) begin
      failures++;
      $display("FAIL: MSP gated %0d times, active %0d times", n_gated, n_active);
    end
    $display("MSP gated %0d, active %0d", n_gated, n_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
