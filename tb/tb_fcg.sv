// tb_fcg: checks the final carry generator. Its L, M inputs are derived
// here from random operands p, q; every carry it returns must equal the
// carry into that bit of p + q + cin, and cout the carry out of bit 31.
module tb_fcg;
  localparam int N = 32;
  logic [N-1:0] p, q, l_n, m, c;
  logic         cin, cout;
  int checks = 0, failures = 0;

  fcg #(.N(N)) dut (.l_n(l_n), .m(m), .cin(cin), .c(c), .cout(cout));

  task automatic check();
    logic [N:0] sum, exp_c;
    logic [63:0] mask;
    for (int i = 0; i < N; i++) begin
      mask = (64'(1) << (i + 1)) - 1;
      l_n[i] = ~1'(((64'(p) & mask) + (64'(q) & mask)) >> (i + 1));
      m[i]   = ((64'(p | q) & mask) == mask);
    end
    #1;
    sum   = (N+1)'(p) + (N+1)'(q) + (N+1)'(cin);
    exp_c = sum ^ {1'b0, p} ^ {1'b0, q};   // carry into each bit
    checks++;
    if ({cout, c} !== exp_c) begin
      failures++;
      $display("FAIL p=%h q=%h cin=%b -> %b %h expected %h", p, q, cin, cout, c, exp_c);
    end
  endtask

  initial begin
    p = '1; q = '0; cin = 1'b1; check();
    p = '1; q = '0; cin = 1'b0; check();
    for (int n = 0; n < 5000; n++) begin
      p = $urandom; q = $urandom; cin = 1'($urandom); check();
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
