// tb_cb_mul: checks the 16x16 counter-based Wallace tree multiplier against
// the built-in product: corner operands, the operand pair of the reference
// waveform (0x03e8 * 0xffff = 0x03e7fc18), every single-bit operand pair,
// and random pairs.
module tb_cb_mul;
  logic [15:0] a, b;
  logic [31:0] z;
  int checks = 0, failures = 0;

  cb_mul dut (.a(a), .b(b), .z(z));

  task automatic check();
    #1;
    checks++;
    if (z !== 32'(a) * 32'(b)) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", a, b, z, 32'(a) * 32'(b));
    end
  endtask

  initial begin
    a = 16'hffff; b = 16'hffff; check();
    a = 16'h0000; b = 16'hffff; check();
    a = 16'h03e8; b = 16'hffff; check();
    if (z !== 32'h03e7fc18) begin failures++; $display("FAIL reference product %h", z); end
    checks++;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 16'(1) << i; b = 16'(1) << j; check();
      end
    for (int n = 0; n < 50000; n++) begin
      a = 16'($urandom); b = 16'($urandom); check();
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
