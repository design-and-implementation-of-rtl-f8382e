// Self-checking testbench of the RoBA shifter: the three shifted products
// are compared with multiplications by 2^k worked out in the testbench.
module tb_roba_shifter;
  localparam int unsigned N  = 64;
  localparam int unsigned KW = $clog2(N + 1);
  localparam int unsigned PW = 2 * N;
  logic [N-1:0]  x_mag, y_mag;
  logic [KW-1:0] kx, ky;
  logic          x_zero, y_zero;
  logic [PW-1:0] xr_y, x_yr, xr_yr;
  int checks = 0, failures = 0;

  roba_shifter #(.N(N)) dut (.*);

  task automatic check();
    logic [PW-1:0] px, py, e1, e2, e3;
    #1;
    px = x_zero ? '0 : (PW'(1) << kx);
    py = y_zero ? '0 : (PW'(1) << ky);
    e1 = px * PW'(y_mag);
    e2 = PW'(x_mag) * py;
    e3 = px * py;
    checks++;
    if (xr_y !== e1 || x_yr !== e2 || xr_yr !== e3) begin
      failures++;
      $display("FAIL x=%0d y=%0d kx=%0d ky=%0d", x_mag, y_mag, kx, ky);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      x_mag  = {$urandom, $urandom} >> ($urandom % 64);
      y_mag  = {$urandom, $urandom} >> ($urandom % 64);
      kx     = KW'($urandom % 64);
      ky     = KW'($urandom % 64);
      x_zero = ($urandom % 8) == 0;
      y_zero = ($urandom % 8) == 0;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
