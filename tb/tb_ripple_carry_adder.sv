// tb_ripple_carry_adder: self-checking test of ripple_carry_adder at W = 8
// (exhaustive over a, b and cin) and at W = 12 (random plus full-length
// carry propagation). {cout, sum} is compared with a + b + cin.
module tb_ripple_carry_adder;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [11:0] a12, b12, s12;
  logic        ci12, co12;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(8)) dut8 (
    .a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  ripple_carry_adder #(.W(12)) dut12 (
    .a(a12), .b(b12), .cin(ci12), .sum(s12), .cout(co12));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check12();
    #1;
    checks++;
    if ({co12, s12} !== 13'({1'b0, a12} + {1'b0, b12} + 13'(ci12))) begin
      failures++;
      $display("FAIL W=12 a=%h b=%h cin=%b got %b_%h", a12, b12, ci12, co12, s12);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        {ci8, a8} = 9'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if ({co8, s8} !== 9'(int'(a8) + int'(b8) + int'(ci8))) begin
          failures++;
          if (failures < 10)
            $display("FAIL W=8 a=%h b=%h cin=%b got %b_%h", a8, b8, ci8, co8, s8);
        end
      end
    end
    a12 = 12'hfff; b12 = 12'h000; ci12 = 1'b1; check12();
    a12 = 12'h800; b12 = 12'h800; ci12 = 1'b0; check12();
    for (int n = 0; n < 2000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); ci12 = 1'($urandom);
      check12();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
