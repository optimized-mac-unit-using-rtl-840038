// tb_mfa: exhaustive check of the multiplexer-based full adder against the
// arithmetic sum of its three inputs.
module tb_mfa;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  mfa dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> carry=%b sum=%b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
