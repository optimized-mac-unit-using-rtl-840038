// tb_cla: checks the 32-bit carry look-ahead adder on random operands and on
// carry chains that cross every group boundary, against 33-bit arithmetic.
module tb_cla;
  localparam int W = 32;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    #1;
    checks++;
    if ({cout, s} !== 33'(a) + 33'(b) + 33'(cin)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b %h", a, b, cin, cout, s);
    end
  endtask

  initial begin
    for (int k = 0; k < W; k++) begin
      a = '1 >> k; b = 32'(1); cin = 1'b0; check();
      a = '1 << k; b = '1;     cin = 1'b1; check();
    end
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
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
