// tb_ut_quadrant_adder: self-checking test of the quadrant adder at H = 2
// (exhaustive over all 4-bit sub-products) and H = 4 (random). The output
// is compared with q_hh*2^(2H) + (q_hl + q_lh)*2^H + q_ll. Only
// combinations a real multiplier can produce keep the result within 4H
// bits, so the sub-products are formed from random operand halves.
module tb_ut_quadrant_adder;
  logic [3:0]  q2_ll, q2_hl, q2_lh, q2_hh;
  logic [7:0]  p2;
  logic [7:0]  q4_ll, q4_hl, q4_lh, q4_hh;
  logic [15:0] p4;
  int checks = 0, failures = 0;

  ut_quadrant_adder #(.H(2)) dut2 (
    .q_ll(q2_ll), .q_hl(q2_hl), .q_lh(q2_lh), .q_hh(q2_hh), .p(p2));
  ut_quadrant_adder #(.H(4)) dut4 (
    .q_ll(q4_ll), .q_hl(q4_hl), .q_lh(q4_lh), .q_hh(q4_hh), .p(p4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int al, ah, bl, bh;
    // H = 2: every operand pair of a 4x4 multiply
    for (int i = 0; i < 256; i++) begin
      {ah, al, bh, bl} = {30'd0, i[7:6], 30'd0, i[5:4], 30'd0, i[3:2], 30'd0, i[1:0]};
      q2_ll = 4'(al * bl); q2_hl = 4'(ah * bl);
      q2_lh = 4'(al * bh); q2_hh = 4'(ah * bh);
      #1;
      checks++;
      if (p2 !== 8'((int'(q2_hh) << 4) + ((int'(q2_hl) + int'(q2_lh)) << 2) + int'(q2_ll))) begin
        failures++;
        $display("FAIL H=2 q=%h %h %h %h got %h", q2_hh, q2_lh, q2_hl, q2_ll, p2);
      end
    end
    // H = 4: random operand halves plus the all-ones corner
    for (int n = 0; n < 3000; n++) begin
      if (n == 0) begin
        al = 15; ah = 15; bl = 15; bh = 15;
      end else begin
        al = int'($urandom_range(15)); ah = int'($urandom_range(15));
        bl = int'($urandom_range(15)); bh = int'($urandom_range(15));
      end
      q4_ll = 8'(al * bl); q4_hl = 8'(ah * bl);
      q4_lh = 8'(al * bh); q4_hh = 8'(ah * bh);
      #1;
      checks++;
      if (p4 !== 16'((int'(q4_hh) << 8) + ((int'(q4_hl) + int'(q4_lh)) << 4) + int'(q4_ll))) begin
        failures++;
        $display("FAIL H=4 q=%h %h %h %h got %h", q4_hh, q4_lh, q4_hl, q4_ll, p4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
