// tb_csa: random check of the 32-bit carry-save adder: the sum row plus the
// carry row shifted by one must equal x + y + z (computed in 64 bits), and
// each bit pair must be the two-bit count of the three input bits.
module tb_csa;
  localparam int W = 32;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      x = $urandom; y = $urandom; z = $urandom;
      if (n == 0) begin x = '1; y = '1; z = '1; end
      #1;
      checks++;
      if (64'(s) + (64'(c) << 1) !== 64'(x) + 64'(y) + 64'(z)) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
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
