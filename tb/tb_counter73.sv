// tb_counter73: exhaustive check of the 7:3 counter: for all 128 input
// patterns, sum + 2*c1 + 4*c2 must equal the number of ones.
module tb_counter73;
  logic [6:0] i;
  logic       sum, c1, c2;
  int checks = 0, failures = 0;

  counter73 dut (.i(i), .sum(sum), .c1(c1), .c2(c2));

  initial begin
    for (int v = 0; v < 128; v++) begin
      int ones;
      i = 7'(v);
      ones = 0;
      for (int k = 0; k < 7; k++) ones += (v >> k) & 1;
      #1;
      checks++;
      if ({c2, c1, sum} !== 3'(ones)) begin
        failures++;
        $display("FAIL i=%b -> %b%b%b expected %0d", i, c2, c1, sum, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
