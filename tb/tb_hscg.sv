// tb_hscg: checks the half sum and carry generator of a 32-bit adder on
// random and corner operands. For every bit i the expected values come
// from arithmetic on the low bits: L_i is the carry out of p[i:0]+q[i:0],
// M_i is whether p[i:0]+q[i:0] is all ones or carries (so a carry-in of one
// leaves the low part), and N_i is bit i of p^q.
module tb_hscg;
  localparam int N = 32;
  logic [N-1:0] p, q, l_n, m, n_n;
  int checks = 0, failures = 0;

  hscg #(.N(N)) dut (.p(p), .q(q), .l_n(l_n), .m(m), .n_n(n_n));

  task automatic check();
    logic [63:0] lo;
    logic [63:0] mask;
    #1;
    for (int i = 0; i < N; i++) begin
      mask = (64'(1) << (i + 1)) - 1;
      lo = (64'(p) & mask) + (64'(q) & mask);
      checks++;
      if (~l_n[i] !== lo[i+1]) begin
        failures++; $display("FAIL L%0d p=%h q=%h", i, p, q);
      end
      checks++;
      // M_i: every bit position up to i has p|q set
      if (m[i] !== ((64'(p | q) & mask) == mask)) begin
        failures++; $display("FAIL M%0d p=%h q=%h", i, p, q);
      end
      checks++;
      if (~n_n[i] !== (p[i] ^ q[i])) begin
        failures++; $display("FAIL N%0d p=%h q=%h", i, p, q);
      end
    end
  endtask

  initial begin
    p = '1; q = '0; check();
    p = '1; q = 32'(1); check();
    p = 32'h8000_0000; q = 32'h8000_0000; check();
    for (int n = 0; n < 3000; n++) begin
      p = $urandom; q = $urandom; check();
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
