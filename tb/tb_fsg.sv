// tb_fsg: checks the final sum generator. From random p, q and carry-in the
// test forms the complemented half sums and the true carries into each bit;
// the generator must then return p + q + cin.
module tb_fsg;
  localparam int N = 32;
  logic [N-1:0] p, q, n_n, c, s;
  logic         cin;
  int checks = 0, failures = 0;

  fsg #(.N(N)) dut (.n_n(n_n), .c(c), .s(s));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [N-1:0] sum;
      p = $urandom; q = $urandom; cin = 1'($urandom);
      sum = p + q + N'(cin);
      n_n = ~(p ^ q);
      c   = sum ^ p ^ q;
      #1;
      checks++;
      if (s !== sum) begin
        failures++;
        $display("FAIL p=%h q=%h cin=%b -> %h expected %h", p, q, cin, s, sum);
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
