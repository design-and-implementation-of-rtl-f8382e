// Self-checking testbench of the modified RoBA multiplier at N = 64.
// For every mode, random operands of random widths and corner operands
// (0, +-1, powers of two, tie points, the extremes) are compared with the
// reference products of roba_ref_pkg, read both as signed and as unsigned
// numbers. Also checks that ROBA_FULL is exact when one operand is a power
// of two, that the unsigned Xr*Yr saturation case occurs, and reports the
// mean relative error of each mode for signed operands.
module tb_roba_multiplier;
  import roba_mac_pkg::*;
  import roba_ref_pkg::*;
  localparam int unsigned N = 64;
  logic [N-1:0]   x, y;
  logic           tc;
  roba_mode_e     mode;
  logic [2*N-1:0] p;
  logic [1:0]     spst_msp_off;
  int checks = 0, failures = 0, n_sat = 0;
  real err_sum [4];
  int  err_cnt [4];

  roba_multiplier #(.N(N)) dut (.*);

  task automatic check(longint xv, longint yv, int m, bit t);
    wide_t e;
    x = xv;
    y = yv;
    tc = t;
    mode = roba_mode_e'(m);
    #1;
    e = roba_product(xv, yv, m, t);
    checks++;
    if (p !== e[2*N-1:0]) begin
      failures++;
      $display("FAIL x=%h y=%h tc=%0b mode=%0d p=%h expected %h", xv, yv, t, m, p, e);
    end
    if (!t && m == 0 && p == '1) n_sat++;
    if (t && xv != 0 && yv != 0) begin
      real ex, ap;
      ex = real'(xv) * real'(yv);
      ap = real'($signed(p));
      err_sum[m] += ((ap > ex) ? ap - ex : ex - ap) / ((ex > 0) ? ex : -ex);
      err_cnt[m]++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint corners [14] = '{0, 1, -1, 3, -3, 5, 6, -7, 64'h7fff_ffff_ffff_ffff,
                             64'sh8000_0000_0000_0000, 64'h3000_0000_0000_0000,
                             -64'sh2fff_ffff_ffff_ffff, 64'shc000_0000_0000_0000,
                             64'shbfff_ffff_ffff_ffff};
    for (int m = 0; m < 4; m++) begin
      err_sum[m] = 0.0;
      err_cnt[m] = 0;
    end
    for (int t = 0; t < 2; t++)
      for (int m = 0; m < 4; m++) begin
        foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j], m, t[0]);
        repeat (1500) check(rand_operand(64), rand_operand(64), m, t[0]);
        // small operands, as in 8-bit media data
        repeat (500) check(rand_operand(8), rand_operand(8), m, t[0]);
      end
    // with Xr = X the full RoBA term equals the exact product
    repeat (200) begin
      longint xv, yv;
      xv = longint'(1) << ($urandom % 31);
      if ($urandom % 2) xv = -xv;
      yv = rand_operand(32);
      x = xv; y = yv; tc = 1'b1; mode = ROBA_FULL;
      #1;
      checks++;
      if (p !== 128'(xv * yv)) begin
        failures++;
        $display("FAIL exact case x=%0d y=%0d p=%0d", xv, yv, p);
      end
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL: unsigned Xr*Yr saturation never exercised");
    end
    for (int m = 0; m < 4; m++)
      $display("mode %0d: mean relative error %0.4f over %0d signed products", m,
               err_sum[m] / err_cnt[m], err_cnt[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
