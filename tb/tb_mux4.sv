// tb_mux4: exhaustive check of the 4-to-1 multiplexer: every data pattern
// and every select value, y must equal d[s].
module tb_mux4;
  logic [3:0] d;
  logic [1:0] s;
  logic       y;
  int checks = 0, failures = 0;

  mux4 dut (.d(d), .s(s), .y(y));

  initial begin
    for (int dv = 0; dv < 16; dv++) begin
      for (int sv = 0; sv < 4; sv++) begin
        d = 4'(dv);
        s = 2'(sv);
        #1;
        checks++;
        if (y !== 1'((dv >> sv) & 1)) begin
          failures++;
          $display("FAIL d=%b s=%0d y=%b", d, s, y);
        end
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
