// tb_half_adder: exhaustive self-checking test of half_adder. All four
// input pairs are applied and sum/carry are compared with the arithmetic
// sum a + b. Combinational: outputs are sampled 1 ns after each input.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b got carry=%b sum=%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
