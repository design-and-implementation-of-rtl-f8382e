// End-to-end testbench of the RoBA MAC at its default size (64-bit
// operands, 128-bit accumulator), with no parameter overridden.
//
// Runs accumulation sequences that mix exact (Booth) and approximate (RoBA,
// all four modes) products of signed and unsigned operands, random clears and reads, idle cycles, small and
// large operands of both signs. A reference accumulator modulo 2^128 uses
// the exact product or the reference RoBA product. Every read must return
// the reference sum of all inputs before it, exactly one cycle later, and
// result_valid must follow rd by one cycle. Each mechanism the design has
// is counted and must occur at least once: clear, read, signed and unsigned
// operands, exact and each RoBA mode, Booth upper-half disable, RoBA adder and subtractor MSP gating,
// final-adder MSP gating and full-width final addition, negative products,
// and idle cycles that hold the sum.
module tb_roba_mac;
  import roba_mac_pkg::*;
  import roba_ref_pkg::*;
  localparam int unsigned N = DEFAULT_N;   // the top's own default
  localparam int unsigned PW = 2 * N;

  logic clk = 0, rst_n;
  logic in_valid, clear, tc, approx, rd;
  roba_mode_e mode;
  logic [N-1:0] x, y;
  logic [PW-1:0] result, csa_sum, csa_carry;
  logic result_valid, booth_upper_off, final_msp_off;
  logic [1:0] roba_msp_off;

  int checks = 0, failures = 0;
  int n_clear = 0, n_rd = 0, n_exact = 0, n_idle = 0, n_neg = 0, n_signed = 0, n_unsigned = 0;
  int n_mode [4];
  int n_booth_off = 0, n_add_off = 0, n_sub_off = 0, n_fin_off = 0, n_fin_on = 0;
  logic [PW-1:0] ref_acc;

  roba_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_need(string what, int n);
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    foreach (n_mode[i]) n_mode[i] = 0;
    rst_n = 0; in_valid = 0; clear = 0; tc = 1; approx = 0; rd = 0;
    mode = ROBA_XR_YR; x = '0; y = '0;
    ref_acc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (4000) begin
      wide_t prod;
      int bits;
      bits     = ($urandom % 2) ? 16 : 64;
      in_valid = ($urandom % 6) != 0;
      clear    = ($urandom % 20) == 0;
      approx   = ($urandom % 3) != 0;
      tc       = ($urandom % 4) != 0;
      mode     = roba_mode_e'($urandom % 4);
      rd       = ($urandom % 6) == 0;
      x        = rand_operand(bits);
      y        = rand_operand(bits);
      prod     = approx ? roba_product(x, y, int'(mode), tc) : exact_product(x, y, tc);
      #1;
      // status of the combinational SPST detectors in this cycle
      if (in_valid && !approx && booth_upper_off && y != 0 && y != '1) n_booth_off++;
      if (in_valid && approx && mode inside {ROBA_AVG, ROBA_FULL} && roba_msp_off[0] &&
          x != 0 && y != 0) n_add_off++;
      if (in_valid && approx && mode == ROBA_FULL && roba_msp_off[1] && x != 0 && y != 0)
        n_sub_off++;
      if (rd) begin
        if (final_msp_off) n_fin_off++; else n_fin_on++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (result_valid !== rd || (rd && result !== ref_acc)) begin
        failures++;
        $display("FAIL read: rd=%0b valid=%0b result=%h expected %h", rd, result_valid,
                 result, ref_acc);
      end
      if (rd) n_rd++;
      if (in_valid) begin
        if (clear) begin
          ref_acc = PW'(prod);
          n_clear++;
        end else ref_acc += PW'(prod);
        if (approx) n_mode[int'(mode)]++; else n_exact++;
        if (prod < 0) n_neg++;
        if (tc) n_signed++; else n_unsigned++;
      end else n_idle++;
      checks++;
      if (csa_sum + csa_carry !== ref_acc) begin
        failures++;
        $display("FAIL state: S+C=%h expected %h", csa_sum + csa_carry, ref_acc);
      end
      rd = 0;
      in_valid = 0;
    end
    count_need("clears", n_clear);
    count_need("reads", n_rd);
    count_need("idle cycles", n_idle);
    count_need("signed operations", n_signed);
    count_need("unsigned operations", n_unsigned);
    count_need("exact Booth products", n_exact);
    count_need("RoBA Xr*Yr products", n_mode[0]);
    count_need("RoBA Xr*Y products", n_mode[1]);
    count_need("RoBA average products", n_mode[2]);
    count_need("RoBA full products", n_mode[3]);
    count_need("negative products", n_neg);
    count_need("Booth upper half disabled", n_booth_off);
    count_need("RoBA adder MSP gated", n_add_off);
    count_need("RoBA subtractor MSP gated", n_sub_off);
    count_need("final adder MSP gated", n_fin_off);
    count_need("final adder full width", n_fin_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
