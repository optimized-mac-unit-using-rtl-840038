// tb_and_32bit: the enable gate must pass its 32-bit input when the enable
// is one and return zero when it is zero.
module tb_and_32bit;
  logic [31:0] a, y;
  logic        b;
  int checks = 0, failures = 0;

  and_32bit #(.W(32)) dut (.a(a), .b(b), .y(y));

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a = $urandom; b = 1'(n & 1);
      if (n < 2) a = '1;
      #1;
      checks++;
      if (y !== (b ? a : 32'd0)) begin
        failures++;
        $display("FAIL a=%h b=%b y=%h", a, b, y);
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
