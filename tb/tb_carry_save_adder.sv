// tb_carry_save_adder: self-checking test of carry_save_adder at W = 8.
// Random and corner operands are applied; each bit position is checked to
// be a full adder (s[i], c[i] from x[i], y[i], z[i]) and the value rule
// x + y + z == s + 2*c is checked as a whole.
module tb_carry_save_adder;
  localparam int unsigned W = 8;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  carry_save_adder #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W+1:0] want, got;
    #1;
    want = {2'b0, x} + {2'b0, y} + {2'b0, z};
    got  = {2'b0, s} + {1'b0, c, 1'b0};
    checks++;
    if (want !== got) begin
      failures++;
      $display("FAIL value x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
    end
    for (int i = 0; i < W; i++) begin
      checks++;
      if ({c[i], s[i]} !== 2'(int'(x[i]) + int'(y[i]) + int'(z[i]))) begin
        failures++;
        $display("FAIL bit %0d x=%h y=%h z=%h s=%h c=%h", i, x, y, z, s, c);
      end
    end
  endtask

  initial begin
    x = '0; y = '0; z = '0; check();
    x = '1; y = '1; z = '1; check();
    x = '1; y = '0; z = '1; check();
    for (int n = 0; n < 500; n++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
