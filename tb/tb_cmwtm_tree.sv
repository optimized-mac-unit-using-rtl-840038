// tb_cmwtm_tree: checks the counter reduction tree. For random operands and
// random extra rows the three output rows must add up (mod 2^32) to
// a*b + x1 + x2 + x3, and the carry rows must have zeros in their low
// bits (c1 bit 0, c2 bits 1:0), as they are pre-shifted.
module tb_cmwtm_tree;
  logic [15:0] a, b;
  logic [31:0] x1, x2, x3, s, c1, c2;
  int checks = 0, failures = 0;

  cmwtm_tree dut (.a(a), .b(b), .x1(x1), .x2(x2), .x3(x3), .s(s), .c1(c1), .c2(c2));

  task automatic check();
    logic [31:0] expected;
    #1;
    expected = 32'(a) * 32'(b) + x1 + x2 + x3;
    checks++;
    if (s + c1 + c2 !== expected || c1[0] !== 1'b0 || c2[1:0] !== 2'b00) begin
      failures++;
      $display("FAIL a=%h b=%h x=%h %h %h: rows %h %h %h, expected sum %h",
               a, b, x1, x2, x3, s, c1, c2, expected);
    end
  endtask

  initial begin
    a = '1; b = '1; x1 = '1; x2 = '1; x3 = '1; check();
    x1 = '0; x2 = '0; x3 = '0; check();
    for (int n = 0; n < 20000; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      x1 = (n % 3 == 0) ? '0 : $urandom;
      x2 = (n % 5 == 0) ? '0 : $urandom;
      x3 = (n % 7 == 0) ? '0 : $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
