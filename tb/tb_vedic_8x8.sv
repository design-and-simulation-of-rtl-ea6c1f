// tb_vedic_8x8: end-to-end, full-size test of the 8x8 Urdhva multiplier.
//
// The top is used with its defaults. All 65,536 operand pairs are applied
// one per nanosecond and P is compared with two independent references:
// the integer product A * B, and a column-by-column model of the vertical
// and crosswise procedure (column k adds every a[i]&b[k-i] to the carry
// left from column k-1; its LSB is product bit k and the rest carries on).
// The two references are also checked against each other.
//
// The design is combinational, so every product must be correct in the
// same time step its operands are applied. The test also counts how often
// each adder mechanism was exercised and fails if one never was: a
// non-zero carry vector out of the carry-save rows (8x8 and 4x4 levels),
// a carry rippling out of the merging adder's carry-save region into the
// upper half of the high sub-product, and the largest product 255 * 255.
module tb_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_csa8 = 0, n_csa4 = 0, n_ripple_hi = 0, n_max = 0;

  vedic_8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ut_columns(logic [7:0] x, logic [7:0] y);
    logic [15:0] r;
    int carry;
    r = '0;
    carry = 0;
    for (int k = 0; k < 15; k++) begin
      int col;
      col = carry;
      for (int i = 0; i < 8; i++)
        if (k - i >= 0 && k - i < 8) col += int'(x[i]) * int'(y[k-i]);
      r[k] = col[0];
      carry = col >> 1;
    end
    r[15] = carry[0];
    return r;
  endfunction

  initial begin
    logic [15:0] want, want_ut;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      want    = 16'(int'(a) * int'(b));
      want_ut = ut_columns(a, b);
      checks++;
      if (want_ut !== want) begin
        failures++;
        $display("FAIL reference mismatch %0d*%0d: %0d vs %0d", a, b, want, want_ut);
      end
      checks++;
      if (p !== want) begin
        failures++;
        if (failures < 20) $display("FAIL %0d*%0d got %0d want %0d", a, b, p, want);
      end
      if (dut.u_add.csa_c != '0) n_csa8++;
      if (dut.u_ll.u_add.csa_c != '0) n_csa4++;
      if (dut.u_add.vma_sum[11:8] != dut.u_add.q_hh[7:4]) n_ripple_hi++;
      if (a == 8'hff && b == 8'hff) n_max++;
    end
    $display("mechanisms: csa8_carry=%0d csa4_carry=%0d ripple_into_high=%0d max_product=%0d",
             n_csa8, n_csa4, n_ripple_hi, n_max);
    checks++;
    if (n_csa8 == 0)      begin failures++; $display("FAIL 8x8 carry-save carry never seen"); end
    checks++;
    if (n_csa4 == 0)      begin failures++; $display("FAIL 4x4 carry-save carry never seen"); end
    checks++;
    if (n_ripple_hi == 0) begin failures++; $display("FAIL ripple into high half never seen"); end
    checks++;
    if (n_max == 0)       begin failures++; $display("FAIL maximum product never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
