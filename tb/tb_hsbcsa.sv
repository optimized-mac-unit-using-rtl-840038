// tb_hsbcsa: checks the binary carry select adder: a 32-bit instance on
// random and carry-chain operands, and an 8-bit instance exhaustively,
// both against plain arithmetic including the carry out.
module tb_hsbcsa;
  logic [31:0] p, q, s;
  logic        cin, cout;
  logic [7:0]  p8, q8, s8;
  logic        cin8, cout8;
  int checks = 0, failures = 0;

  hsbcsa #(.N(32)) dut   (.p(p),  .q(q),  .cin(cin),  .s(s),  .cout(cout));
  hsbcsa #(.N(8))  dut8  (.p(p8), .q(q8), .cin(cin8), .s(s8), .cout(cout8));

  task automatic check32();
    #1;
    checks++;
    if ({cout, s} !== 33'(p) + 33'(q) + 33'(cin)) begin
      failures++;
      $display("FAIL %h + %h + %b -> %b %h", p, q, cin, cout, s);
    end
  endtask

  initial begin
    for (int k = 0; k < 32; k++) begin
      p = '1 >> k; q = 32'(1); cin = 1'b0; check32();
      p = '1 << k; q = '0;     cin = 1'b1; check32();
    end
    for (int n = 0; n < 20000; n++) begin
      p = $urandom; q = $urandom; cin = 1'($urandom); check32();
    end
    for (int v = 0; v < 1 << 17; v++) begin
      {cin8, p8, q8} = 17'(v);
      #1;
      checks++;
      if ({cout8, s8} !== 9'(p8) + 9'(q8) + 9'(cin8)) begin
        failures++;
        $display("FAIL8 %h + %h + %b -> %b %h", p8, q8, cin8, cout8, s8);
      end
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
