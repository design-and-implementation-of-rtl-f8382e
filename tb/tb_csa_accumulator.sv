// Self-checking testbench of the carry-save accumulator at its default
// size (128-bit words, 34 rows). Random rows are accumulated with random
// clear, idle and read cycles; a reference sum modulo 2^128 is kept in the
// testbench. A read in cycle t must return, in cycle t+1 with
// result_valid, the sum of all inputs up to cycle t-1, and S + C must equal
// the reference at all times.
module tb_csa_accumulator;
  localparam int unsigned W = 128, K = 34;
  logic clk = 0, rst_n;
  logic in_valid, clear, rd;
  logic [K-1:0][W-1:0] rows;
  logic [W-1:0] sum_q, carry_q, result;
  logic result_valid, final_msp_off;
  int checks = 0, failures = 0, n_clear = 0, n_rd = 0, cycles = 0;
  logic [W-1:0] ref_acc, exp_result;
  bit exp_valid;

  csa_accumulator #(.W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; clear = 0; rd = 0; rows = '0;
    ref_acc = '0; exp_valid = 0; exp_result = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3000) begin
      logic [W-1:0] rsum;
      // drive inputs for this cycle
      in_valid = ($urandom % 4) != 0;
      clear    = ($urandom % 16) == 0;
      rd       = ($urandom % 5) == 0;
      rsum = '0;
      for (int k = 0; k < K; k++) begin
        rows[k] = ($urandom % 3 == 0) ? '0 :
                  {$urandom, $urandom, $urandom, $urandom} >> ($urandom % 128);
        rsum += rows[k];
      end
      @(posedge clk);
      #1;
      cycles++;
      // the result requested last cycle is visible now
      checks++;
      if (result_valid !== rd || (rd && result !== ref_acc)) begin
        failures++;
        $display("FAIL read: valid=%0b result=%h expected %h", result_valid, result, ref_acc);
      end
      if (rd) n_rd++;
      if (in_valid) begin
        if (clear) begin
          ref_acc = rsum;
          n_clear++;
        end else ref_acc += rsum;
      end
      checks++;
      if (sum_q + carry_q !== ref_acc) begin
        failures++;
        $display("FAIL state: S+C=%h expected %h", sum_q + carry_q, ref_acc);
      end
      rd = 0;
    end
    if (n_clear == 0 || n_rd == 0) begin
      failures++;
      $display("FAIL: clears %0d reads %0d", n_clear, n_rd);
    end
    $display("clears %0d, reads %0d over %0d cycles", n_clear, n_rd, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
